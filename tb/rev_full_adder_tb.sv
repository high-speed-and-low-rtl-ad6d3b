// rev_full_adder_tb: exhaustive check of the reversible full adder: sum and
// carry against integer addition, the propagate output against a ^ b, and
// the two garbage outputs against a and a ^ b.
module rev_full_adder_tb;
  logic a, b, cin, sum, cout, prop;
  logic [1:0] garbage;
  int checks = 0, failures = 0;

  rev_full_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout),
                      .prop(prop), .garbage(garbage));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic [1:0] total;
      {a, b, cin} = 3'(v);
      #1;
      total = 2'(a) + 2'(b) + 2'(cin);
      checks++;
      if ({cout, sum} !== total) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b -> cout=%b sum=%b", a, b, cin, cout, sum);
      end
      checks++;
      if (prop !== (a ^ b)) begin
        failures++;
        $display("FAIL prop a=%b b=%b -> %b", a, b, prop);
      end
      checks++;
      if (garbage !== {a ^ b, a}) begin
        failures++;
        $display("FAIL garbage a=%b b=%b -> %b", a, b, garbage);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
