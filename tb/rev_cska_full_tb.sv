// rev_cska_full_tb: the adder at its default size (32 bits, 4-bit stages),
// with no parameter override. It adds directed operand pairs that exercise
// the skip path end to end (all bits propagating with ci = 1), carries
// generated in every stage and carries entering every stage, then random
// operands, and compares {co, s} with integer addition.
module rev_cska_full_tb;
  logic [31:0] a, b, s;
  logic        ci, co;
  int checks = 0, failures = 0;

  rev_cska dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [31:0] va, input logic [31:0] vb, input logic vci);
    logic [32:0] exp;
    a  = va;
    b  = vb;
    ci = vci;
    #1;
    exp = {1'b0, va} + {1'b0, vb} + {32'b0, vci};
    checks++;
    if ({co, s} !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL a=%h b=%h ci=%b -> %h exp %h", va, vb, vci, {co, s}, exp);
    end
  endtask

  initial begin
    apply(32'h0000_0000, 32'h0000_0000, 1'b0);
    apply(32'hFFFF_FFFF, 32'h0000_0000, 1'b1);
    apply(32'hAAAA_AAAA, 32'h5555_5555, 1'b1);
    apply(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);
    apply(32'h8888_8888, 32'h8888_8888, 1'b0);
    for (int k = 0; k < 32; k++) begin
      apply(32'hFFFF_FFFF >> k, 32'h0000_0001, 1'b0);
      apply(32'h1 << k, 32'h1 << k, 1'b1);
    end
    for (int i = 0; i < 5000; i++) apply($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
