// rev_full_adder: one-bit full adder made of two reversible cells.
//
// Each cell is a Toffoli gate followed by a Toffoli used as a CNOT
// (toffoli_cnot_cell, the "TOFFOLI 1" and "TOFFOLI 2" boxes of the design):
//
//   cell 1: (a, b, 0)      -> (g1 = a,      o1 = a ^ b,       o2 = a & b)
//   cell 2: (o1, cin, o2)  -> (g2 = a ^ b,  sum = a^b^cin,    cout = (a^b)&cin ^ a&b)
//
// Since a^b and a&b are never both 1, the XOR in cout is the OR of the
// generate and propagate terms, so cout is the usual majority function.
// The half-sum o1 = a ^ b is brought out as prop: it is the bit propagate
// signal that the carry skip logic ANDs over a stage. The two garbage
// outputs g1, g2 are brought out as garbage[0] and garbage[1] so that the
// circuit keeps as many outputs as inputs.
//
// Purely combinational. The two-cell structure follows the published full
// adder; the reading of each box as Toffoli plus CNOT is this design's.
module rev_full_adder (
  input  logic       a,
  input  logic       b,
  input  logic       cin,
  output logic       sum,
  output logic       cout,
  output logic       prop,
  output logic [1:0] garbage
);
  logic o1, o2;

  toffoli_cnot_cell u_tof1 (.x(a),  .y(b),   .z(1'b0), .p(garbage[0]), .q(o1),  .r(o2));
  toffoli_cnot_cell u_tof2 (.x(o1), .y(cin), .z(o2),   .p(garbage[1]), .q(sum), .r(cout));

  assign prop = o1;
endmodule
