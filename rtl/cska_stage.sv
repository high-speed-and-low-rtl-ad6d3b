// cska_stage: one stage j >= 2 of the concatenation-incrementation carry
// skip adder.
//
// The stage's RCA adds its operand slices with carry in 0, at the same time
// as every other stage, giving the intermediate sum z, its own carry G and
// the bit propagate signals. When the previous stage's carry arrives, two
// things happen in parallel:
//   - skip_logic forms this stage's carry from G, the AND of the propagate
//     bits and the previous carry, in one compound gate;
//   - the incrementation block adds the previous carry to z to give the
//     final sum bits.
// The critical path thus crosses each stage through one compound gate.
//
// CIN_INV selects the polarity: 0 means c_prev is the true carry and the
// stage uses an AOI gate, so c_next is inverted; 1 means c_prev is inverted,
// the stage uses an OAI gate and c_next is true. The incrementer always gets
// the true carry (an inverter off the skip path when CIN_INV = 1).
//
// Parameters: M, stage width (4 by default, this design's choice); CIN_INV.
// Purely combinational.
module cska_stage #(
  parameter int unsigned M       = 4,
  parameter bit          CIN_INV = 1'b0
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic         c_prev,
  output logic [M-1:0] sum,
  output logic         c_next
);
  logic [M-1:0] z;
  logic [M-1:0] prop;
  logic         g;
  logic         c_true;

  rev_rca #(.M(M)) u_rca (
    .a   (a),
    .b   (b),
    .cin (1'b0),
    .sum (z),
    .cout(g),
    .prop(prop)
  );

  skip_logic #(.M(M), .USE_OAI(CIN_INV)) u_skip (
    .prop (prop),
    .g_in (g),
    .c_in (c_prev),
    .c_out(c_next)
  );

  assign c_true = CIN_INV ? ~c_prev : c_prev;

  rev_incrementer #(.M(M)) u_inc (
    .z  (z),
    .cin(c_true),
    .sum(sum)
  );
endmodule
