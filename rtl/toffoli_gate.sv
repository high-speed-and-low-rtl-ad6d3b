// toffoli_gate: the 3x3 reversible Toffoli (controlled-controlled-NOT) gate.
//
// The two control lines pass straight through (p = a, q = b); the target
// line is flipped when both controls are 1 (r = (a & b) ^ c). The mapping is
// a bijection on three bits, so the gate is its own inverse. It is the only
// primitive the reversible adder is built from: a Toffoli gate with one
// control tied to 1 acts as a CNOT (Feynman) gate, and with the target tied
// to 0 it acts as an AND gate.
//
// Purely combinational, no clock. The port names and equations follow the
// standard definition of the gate.
module toffoli_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = b;
  assign r = (a & b) ^ c;
endmodule
