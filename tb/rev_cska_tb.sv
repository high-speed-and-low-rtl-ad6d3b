// rev_cska_tb: end-to-end check of the reversible carry skip adder.
//
// Three adders are checked side by side on the same operands: the default
// 32-bit one (no parameter override), and 16-bit and 8-bit ones fed with the
// low bits, the three widths the design was published for. Each result
// {co, s} is compared with integer addition. Directed vectors come first,
// then random ones.
//
// For the 32-bit adder the testbench also counts, from the operands alone,
// how often each mechanism of the design is used, and fails if one never is:
//   skip      a stage >= 2 with every bit propagating and a carry coming in,
//             so the carry bypasses its RCA through the skip gate
//   generate  a stage >= 2 whose RCA (carry in 0) produces a carry itself
//   fullskip  ci = 1 and every bit propagating: the carry crosses all stages
//             on the skip path
//   incripple a stage >= 2 whose intermediate sum is all ones and whose
//             incoming carry is 1, so the carry ripples through every half
//             adder of its incrementation block
//   aoi/oai   a carry of 1 entering an AOI stage (even stage number) and an
//             OAI stage (odd stage number >= 3)
//   carryout  co = 1
module rev_cska_tb;
  localparam int unsigned N = 32;
  localparam int unsigned M = 4;
  localparam int unsigned Q = N / M;
  localparam int unsigned NRAND = 20000;

  logic [N-1:0]  a, b;
  logic          ci;
  logic [N-1:0]  s32;
  logic          co32;
  logic [15:0]   s16;
  logic          co16;
  logic [7:0]    s8;
  logic          co8;

  int checks = 0, failures = 0;
  int n_skip = 0, n_gen = 0, n_fullskip = 0, n_incripple = 0;
  int n_aoi = 0, n_oai = 0, n_carryout = 0;

  rev_cska dut32 (.a(a), .b(b), .ci(ci), .s(s32), .co(co32));
  rev_cska #(.N(16), .M(4)) dut16 (.a(a[15:0]), .b(b[15:0]), .ci(ci), .s(s16), .co(co16));
  rev_cska #(.N(8),  .M(4)) dut8  (.a(a[7:0]),  .b(b[7:0]),  .ci(ci), .s(s8),  .co(co8));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Count the mechanisms exercised by the current operands (32-bit adder).
  task automatic count_mechanisms();
    logic [N:0] full;
    full = {1'b0, a} + {1'b0, b} + {{N{1'b0}}, ci};
    if (full[N]) n_carryout++;
    if (ci && ((a ^ b) == '1)) n_fullskip++;
    for (int j = 1; j < int'(Q); j++) begin
      logic [M-1:0] pa, pb, z;
      logic [M:0]   loc;
      logic [N:0]   low;
      logic         cin_j;
      pa  = a[j*M +: M];
      pb  = b[j*M +: M];
      loc = {1'b0, pa} + {1'b0, pb};
      z   = loc[M-1:0];
      // Carry into stage j: carry out of the low j*M bits plus ci.
      low   = ({1'b0, a} & ((N+1)'(1) << (j*M)) - 1) + ({1'b0, b} & ((N+1)'(1) << (j*M)) - 1)
              + {{N{1'b0}}, ci};
      cin_j = low[j*M];
      if (cin_j && ((pa ^ pb) == '1)) n_skip++;
      if (loc[M]) n_gen++;
      if (cin_j && (z == '1)) n_incripple++;
      if (cin_j && (j % 2 == 1)) n_aoi++;
      if (cin_j && (j % 2 == 0)) n_oai++;
    end
  endtask

  task automatic apply(input logic [N-1:0] va, input logic [N-1:0] vb, input logic vci);
    logic [N:0]  e32;
    logic [16:0] e16;
    logic [8:0]  e8;
    a  = va;
    b  = vb;
    ci = vci;
    #1;
    e32 = {1'b0, va} + {1'b0, vb} + {{N{1'b0}}, vci};
    e16 = {1'b0, va[15:0]} + {1'b0, vb[15:0]} + {16'b0, vci};
    e8  = {1'b0, va[7:0]} + {1'b0, vb[7:0]} + {8'b0, vci};
    checks++;
    if ({co32, s32} !== e32) begin
      failures++;
      if (failures < 20) $display("FAIL N=32 a=%h b=%h ci=%b -> %h exp %h", va, vb, vci, {co32, s32}, e32);
    end
    checks++;
    if ({co16, s16} !== e16) begin
      failures++;
      if (failures < 20) $display("FAIL N=16 a=%h b=%h ci=%b -> %h exp %h", va[15:0], vb[15:0], vci, {co16, s16}, e16);
    end
    checks++;
    if ({co8, s8} !== e8) begin
      failures++;
      if (failures < 20) $display("FAIL N=8 a=%h b=%h ci=%b -> %h exp %h", va[7:0], vb[7:0], vci, {co8, s8}, e8);
    end
    count_mechanisms();
  endtask

  initial begin
    // Directed: zeros, all ones, full carry propagation on the skip path,
    // alternating patterns and single-bit carries into every stage.
    apply('0, '0, 1'b0);
    apply('0, '0, 1'b1);
    apply('1, '1, 1'b1);
    apply('1, '0, 1'b1);
    apply(32'h5555_5555, 32'hAAAA_AAAA, 1'b1);
    apply(32'hFFFF_FFFF, 32'h0000_0001, 1'b0);
    apply(32'h0F0F_0F0F, 32'h0F0F_0F0F, 1'b1);
    for (int k = 0; k < int'(N); k++) begin
      apply((N)'(1) << k, ~((N)'(1) << k) | ((N)'(1) << k), 1'b0);
      apply(((N)'(1) << k) - 1, (N)'(1), 1'b0);
      apply(~((N)'(0)) >> k, (N)'(0), 1'b1);
    end
    // Random operands, with some biased so that stages propagate.
    for (int i = 0; i < int'(NRAND); i++) begin
      logic [N-1:0] ra, rb;
      ra = $urandom;
      rb = $urandom;
      if (i % 4 == 1) rb = ~ra ^ ($urandom & $urandom & $urandom);
      apply(ra, rb, 1'($urandom));
    end

    $display("mechanisms: skip=%0d generate=%0d fullskip=%0d incripple=%0d aoi=%0d oai=%0d carryout=%0d",
             n_skip, n_gen, n_fullskip, n_incripple, n_aoi, n_oai, n_carryout);
    checks++; if (n_skip == 0)      begin failures++; $display("FAIL skip never exercised"); end
    checks++; if (n_gen == 0)       begin failures++; $display("FAIL generate never exercised"); end
    checks++; if (n_fullskip == 0)  begin failures++; $display("FAIL full skip never exercised"); end
    checks++; if (n_incripple == 0) begin failures++; $display("FAIL incrementer ripple never exercised"); end
    checks++; if (n_aoi == 0)       begin failures++; $display("FAIL AOI carry never exercised"); end
    checks++; if (n_oai == 0)       begin failures++; $display("FAIL OAI carry never exercised"); end
    checks++; if (n_carryout == 0)  begin failures++; $display("FAIL carry out never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
