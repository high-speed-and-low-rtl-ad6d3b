// rev_cska: N-bit carry skip adder with concatenated RCA blocks, incrementation
// blocks and AOI/OAI skip logic, with every adder cell made of reversible
// Toffoli gates.
//
// The N-bit operands are cut into Q = N/M stages of M bits, stage 1 holding
// the least significant bits. Stage 1 is a plain RCA with carry in ci. Each
// of stages 2..Q adds its slices with carry in 0 (cska_stage), so all RCA
// blocks run at once; the stage carries then pass from stage to stage
// through one AOI or OAI gate each, and each stage's incrementation block
// adds the incoming carry to its intermediate sum.
//
// Carry polarity alternates along the skip chain: stage 1 gives the true
// carry, stage 2 (AOI) the inverted one, stage 3 (OAI) the true one again,
// and so on. The carry out co is corrected for the polarity of the last
// stage.
//
// Interface: s = a + b + ci (N bits) and co the carry out. Purely
// combinational, no clock and no latency. Parameters: N, the adder width
// (32 by default, the largest width the design was published for), and M,
// the fixed stage size (4, this design's choice). N must be a multiple of M.
module rev_cska #(
  parameter int unsigned N = 32,
  parameter int unsigned M = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         ci,
  output logic [N-1:0] s,
  output logic         co
);
  localparam int unsigned Q = N / M;

  if (N % M != 0 || N < M) begin : g_bad_size
    $error("rev_cska: N must be a positive multiple of M");
  end

  // c[j] is the carry out of stage j+1; polarity inverted for odd j >= 1.
  logic [Q-1:0] c;
  logic [M-1:0] prop1;

  rev_rca #(.M(M)) u_stage1 (
    .a   (a[M-1:0]),
    .b   (b[M-1:0]),
    .cin (ci),
    .sum (s[M-1:0]),
    .cout(c[0]),
    .prop(prop1)
  );

  for (genvar j = 1; j < Q; j++) begin : g_stage
    cska_stage #(.M(M), .CIN_INV(j % 2 == 0)) u_stage (
      .a     (a[j*M +: M]),
      .b     (b[j*M +: M]),
      .c_prev(c[j-1]),
      .sum   (s[j*M +: M]),
      .c_next(c[j])
    );
  end

  // Stage index Q-1 (0-based) gives an inverted carry when Q-1 is odd.
  assign co = ((Q - 1) % 2 == 1) ? ~c[Q-1] : c[Q-1];

  // Stage 1 propagate bits are not needed: it has no skip logic.
  logic unused_ok;
  assign unused_ok = ^prop1;
endmodule
