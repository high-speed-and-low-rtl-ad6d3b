// toffoli_cnot_cell: a Toffoli gate followed by a CNOT, both made of Toffoli
// gates (the combination is known as the Peres gate).
//
//   stage 1: Toffoli (x, y, z)   -> (x, y, (x & y) ^ z)
//   stage 2: Toffoli (1, x, y)   -> CNOT, y becomes x ^ y
//
// Overall (x, y, z) -> (p = x, q = x ^ y, r = (x & y) ^ z). With z = 0 the
// cell is a half adder (q = sum, r = carry). Two of these cells make a full
// adder. The constant 1 control of the second gate is an ancilla input.
//
// Purely combinational.
module toffoli_cnot_cell (
  input  logic x,
  input  logic y,
  input  logic z,
  output logic p,
  output logic q,
  output logic r
);
  logic t_p, t_q;
  logic c_p;

  // Toffoli: r gets x&y ^ z, the controls pass through.
  toffoli_gate u_tof (.a(x), .b(y), .c(z), .p(t_p), .q(t_q), .r(r));
  // Toffoli with one control held at 1: a CNOT from x onto y.
  toffoli_gate u_cnot (.a(1'b1), .b(t_p), .c(t_q), .p(c_p), .q(p), .r(q));

  // c_p is the ancilla copy of the constant 1 and carries no information.
  logic unused_ok;
  assign unused_ok = c_p;
endmodule
