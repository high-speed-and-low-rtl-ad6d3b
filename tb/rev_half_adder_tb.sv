// rev_half_adder_tb: exhaustive check of the reversible half adder against
// integer addition of two bits, and of its garbage output (a copy of a).
module rev_half_adder_tb;
  logic a, b, sum, cout, garbage;
  int checks = 0, failures = 0;

  rev_half_adder dut (.a(a), .b(b), .sum(sum), .cout(cout), .garbage(garbage));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if ({cout, sum} !== 2'(int'(a) + int'(b))) begin
        failures++;
        $display("FAIL a=%b b=%b -> cout=%b sum=%b", a, b, cout, sum);
      end
      checks++;
      if (garbage !== a) begin
        failures++;
        $display("FAIL garbage a=%b -> %b", a, garbage);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
