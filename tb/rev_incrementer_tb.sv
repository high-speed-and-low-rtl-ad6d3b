// rev_incrementer_tb: exhaustive check of the incrementation block at its
// default M = 4: sum must equal (z + cin) mod 2^M for every z and cin,
// including the all-ones z that ripples the carry through every half adder.
module rev_incrementer_tb;
  localparam int unsigned M = 4;
  logic [M-1:0] z, sum;
  logic         cin;
  int checks = 0, failures = 0;

  rev_incrementer dut (.z(z), .cin(cin), .sum(sum));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (M + 1)); v++) begin
      logic [M-1:0] exp;
      {cin, z} = (M + 1)'(v);
      #1;
      exp = z + M'(cin);
      checks++;
      if (sum !== exp) begin
        failures++;
        $display("FAIL z=%h cin=%b -> %h exp %h", z, cin, sum, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
