// skip_logic_tb: exhaustive check of both variants of the skip logic at
// M = 4. The reference carry is G | (&P & C). The AOI variant takes the
// true carry and must return its complement; the OAI variant takes the
// complement and must return the true carry.
module skip_logic_tb;
  localparam int unsigned M = 4;
  logic [M-1:0] prop;
  logic         g_in, c_in_t;
  logic         c_aoi, c_oai;
  int checks = 0, failures = 0;

  skip_logic #(.M(M), .USE_OAI(1'b0)) dut_aoi (.prop(prop), .g_in(g_in), .c_in(c_in_t),  .c_out(c_aoi));
  skip_logic #(.M(M), .USE_OAI(1'b1)) dut_oai (.prop(prop), .g_in(g_in), .c_in(~c_in_t), .c_out(c_oai));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (M + 2)); v++) begin
      logic exp;
      {g_in, c_in_t, prop} = (M + 2)'(v);
      #1;
      exp = g_in | ((prop == '1) & c_in_t);
      checks++;
      if (c_aoi !== ~exp) begin
        failures++;
        $display("FAIL AOI p=%b g=%b c=%b -> %b", prop, g_in, c_in_t, c_aoi);
      end
      checks++;
      if (c_oai !== exp) begin
        failures++;
        $display("FAIL OAI p=%b g=%b c=%b -> %b", prop, g_in, c_in_t, c_oai);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
