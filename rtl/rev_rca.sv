// rev_rca: M-bit ripple carry adder of reversible full adders.
//
// Bit i adds a[i], b[i] and the carry from bit i-1; bit 0 takes cin. Besides
// the sum and the final carry it brings out the bit propagate signals
// prop[i] = a[i] ^ b[i], which each full adder produces anyway as its first
// cell's middle output, so the skip logic needs no separate XOR gates.
// Garbage outputs of the full adders are not brought out.
//
// In the carry skip adder stage 1 uses it with cin = Ci and every other
// stage with cin = 0, so all RCA blocks work at the same time.
//
// Parameter M is the stage size (4 by default; the stage size is this
// design's choice). Purely combinational; worst-case delay is M carry steps.
module rev_rca #(
  parameter int unsigned M = 4
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic         cin,
  output logic [M-1:0] sum,
  output logic         cout,
  output logic [M-1:0] prop
);
  logic [M:0]     carry;
  logic [2*M-1:0] garbage;

  assign carry[0] = cin;

  for (genvar i = 0; i < M; i++) begin : g_bit
    rev_full_adder u_fa (
      .a      (a[i]),
      .b      (b[i]),
      .cin    (carry[i]),
      .sum    (sum[i]),
      .cout   (carry[i+1]),
      .prop   (prop[i]),
      .garbage(garbage[2*i +: 2])
    );
  end

  assign cout = carry[M];

  logic unused_ok;
  assign unused_ok = ^garbage;
endmodule
