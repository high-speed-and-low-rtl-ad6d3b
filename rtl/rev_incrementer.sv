// rev_incrementer: incrementation block of a carry skip adder stage.
//
// A chain of M reversible half adders adds the one-bit carry cin to the
// M-bit intermediate result z of the stage's RCA: bit i adds z[i] to the
// carry out of bit i-1, bit 0 adds z[0] to cin. The carry out of the last
// half adder is deliberately dropped: the stage carry comes from the skip
// logic, which is faster, and the incrementer carry would equal it anyway.
//
// The half-adder chain and the unused carry out follow the published design.
// Parameter M is the stage size. Purely combinational.
module rev_incrementer #(
  parameter int unsigned M = 4
) (
  input  logic [M-1:0] z,
  input  logic         cin,
  output logic [M-1:0] sum
);
  logic [M:0]   carry;
  logic [M-1:0] garbage;

  assign carry[0] = cin;

  for (genvar i = 0; i < M; i++) begin : g_bit
    rev_half_adder u_ha (
      .a      (z[i]),
      .b      (carry[i]),
      .sum    (sum[i]),
      .cout   (carry[i+1]),
      .garbage(garbage[i])
    );
  end

  // carry[M] is the unused incrementer carry out; garbage holds copies of z.
  logic unused_ok;
  assign unused_ok = carry[M] ^ (^garbage);
endmodule
