// rev_half_adder: one-bit half adder made of one reversible cell.
//
// A single toffoli_cnot_cell with its target tied to 0 maps (a, b, 0) to
// (a, a ^ b, a & b): the middle output is the sum, the last the carry and the
// first a garbage copy of a. It is the element the incrementation blocks are
// chained from. The published design says only that the incrementer is a
// chain of half adders made of Toffoli gates; this single-cell form is this
// design's. Purely combinational.
module rev_half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic cout,
  output logic garbage
);
  toffoli_cnot_cell u_cell (.x(a), .y(b), .z(1'b0), .p(garbage), .q(sum), .r(cout));
endmodule
