// skip_logic: carry skip logic of one stage, as an AOI or OAI compound gate.
//
// The stage carry is C_j = G_j | (P_j & C_{j-1}), where G_j is the carry out
// of the stage's RCA (which starts from 0) and P_j is the AND of the stage's
// bit propagate signals. If every bit propagates, the RCA cannot generate a
// carry and the previous carry is passed on at once; otherwise the RCA carry
// is the answer. A compound gate replaces the 2:1 multiplexer of a
// conventional carry skip adder.
//
// Inverting gates give an inverted result, so stages alternate:
//   USE_OAI = 0 (AOI): c_in is the true carry, c_out = ~(G | P & c_in),
//                      that is the inverted stage carry.
//   USE_OAI = 1 (OAI): c_in is the inverted carry, c_out = ~(~G & (~P | c_in)),
//                      that is the true stage carry.
// prop and g_in are always given in true polarity; the OAI variant inverts
// them locally (a NAND in place of the AND), off the skip path.
//
// Parameters: M, number of propagate bits; USE_OAI as above. The alternation
// and polarity scheme is this design's choice. Purely combinational.
module skip_logic #(
  parameter int unsigned M       = 4,
  parameter bit          USE_OAI = 1'b0
) (
  input  logic [M-1:0] prop,
  input  logic         g_in,
  input  logic         c_in,
  output logic         c_out
);
  logic p_stage;

  assign p_stage = &prop;

  if (USE_OAI) begin : g_oai
    logic p_n, g_n;
    assign p_n   = ~p_stage;
    assign g_n   = ~g_in;
    assign c_out = ~((p_n | c_in) & g_n);
  end else begin : g_aoi
    assign c_out = ~((p_stage & c_in) | g_in);
  end
endmodule
