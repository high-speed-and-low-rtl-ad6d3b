// toffoli_gate_tb: exhaustive check of the Toffoli gate against its truth
// table (controls pass through, target flips when both controls are 1), and
// a check that applying the gate twice restores the input (reversibility).
module toffoli_gate_tb;
  logic a, b, c, p, q, r;
  logic p2, q2, r2;
  int checks = 0, failures = 0;

  toffoli_gate dut  (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));
  toffoli_gate dut2 (.a(p), .b(q), .c(r), .p(p2), .q(q2), .r(r2));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic [2:0] exp;
      {a, b, c} = 3'(v);
      #1;
      // Expected target: flip only for inputs 110 and 111.
      exp = (v == 6) ? 3'b111 : (v == 7) ? 3'b110 : 3'(v);
      checks++;
      if ({p, q, r} !== exp) begin
        failures++;
        $display("FAIL in=%03b out=%b%b%b exp=%03b", v[2:0], p, q, r, exp);
      end
      checks++;
      if ({p2, q2, r2} !== 3'(v)) begin
        failures++;
        $display("FAIL not self-inverse for in=%03b", v[2:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
