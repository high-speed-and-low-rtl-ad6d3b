// rev_rca_tb: exhaustive check of the M-bit reversible ripple carry adder
// at its default M = 4 (all 512 input combinations): {cout, sum} against
// integer addition and prop against a ^ b.
module rev_rca_tb;
  localparam int unsigned M = 4;
  logic [M-1:0] a, b, sum, prop;
  logic         cin, cout;
  int checks = 0, failures = 0;

  rev_rca dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout), .prop(prop));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2 * M + 1)); v++) begin
      logic [M:0] exp;
      {cin, a, b} = (2 * M + 1)'(v);
      #1;
      exp = (M + 1)'(a) + (M + 1)'(b) + (M + 1)'(cin);
      checks++;
      if ({cout, sum} !== exp) begin
        failures++;
        $display("FAIL a=%h b=%h cin=%b -> %h exp %h", a, b, cin, {cout, sum}, exp);
      end
      checks++;
      if (prop !== (a ^ b)) begin
        failures++;
        $display("FAIL prop a=%h b=%h -> %h", a, b, prop);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
