// cska_stage_tb: exhaustive check of one carry skip adder stage at M = 4 in
// both polarities. For operand slices a, b and incoming carry c the stage
// must give sum = (a + b + c) mod 16 and a stage carry equal to the carry
// out of a + b + c, inverted for the AOI (CIN_INV = 0) variant. The cases
// where the incoming carry skips the whole stage (a ^ b all ones) are
// counted and must occur.
module cska_stage_tb;
  localparam int unsigned M = 4;
  logic [M-1:0] a, b, sum_aoi, sum_oai;
  logic         c_t;
  logic         cn_aoi, cn_oai;
  int checks = 0, failures = 0, skips = 0;

  cska_stage #(.M(M), .CIN_INV(1'b0)) dut_aoi (.a(a), .b(b), .c_prev(c_t),  .sum(sum_aoi), .c_next(cn_aoi));
  cska_stage #(.M(M), .CIN_INV(1'b1)) dut_oai (.a(a), .b(b), .c_prev(~c_t), .sum(sum_oai), .c_next(cn_oai));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2 * M + 1)); v++) begin
      logic [M:0] exp;
      {c_t, a, b} = (2 * M + 1)'(v);
      #1;
      exp = (M + 1)'(a) + (M + 1)'(b) + (M + 1)'(c_t);
      if ((a ^ b) == '1 && c_t) skips++;
      checks++;
      if ({~cn_aoi, sum_aoi} !== exp) begin
        failures++;
        $display("FAIL AOI a=%h b=%h c=%b -> c=%b s=%h exp %h", a, b, c_t, ~cn_aoi, sum_aoi, exp);
      end
      checks++;
      if ({cn_oai, sum_oai} !== exp) begin
        failures++;
        $display("FAIL OAI a=%h b=%h c=%b -> c=%b s=%h exp %h", a, b, c_t, cn_oai, sum_oai, exp);
      end
    end
    checks++;
    if (skips == 0) begin
      failures++;
      $display("FAIL no skip case exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
