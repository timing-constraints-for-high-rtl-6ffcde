// c2_sequential: two C2 pipelines connected in sequence.
//
// The downstream pipeline B receives the clock.  Its outgoing clock (the clock
// of its first latch) passes through one inverting delay and becomes the
// incoming clock of the upstream pipeline A.  The last latch of A and the
// first latch of B are therefore one inversion apart, exactly as two
// neighbouring stages of one pipeline are.  A's output wires straight to B's
// input, and the pair behaves as one pipeline of STAGES_A + STAGES_B
// latches.  This connection is the document's.  The stage counts are this
// design's choice.
//
// Interface: clk (at B's downstream end), din (into A's first latch),
// clk_out (A's outgoing clock), dout (B's last latch).
// Timing: A's first latch captures din when clk_out falls.  dout shows the
// datum STAGES_A + STAGES_B - 2 half clock periods later.
module c2_sequential #(
  parameter int unsigned STAGES_A = 4,
  parameter int unsigned STAGES_B = 4,
  parameter int unsigned WIDTH    = 8
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] din,
  output logic             clk_out,
  output logic [WIDTH-1:0] dout
);

  logic             b_clk_out, a_clk_in;
  logic [WIDTH-1:0] mid;
  logic [WIDTH-1:0] qa [STAGES_A];
  logic [WIDTH-1:0] qb [STAGES_B];

  c2_pipeline #(.STAGES(STAGES_B), .WIDTH(WIDTH)) u_b (
    .clk_in (clk),
    .din    (mid),
    .clk_out(b_clk_out),
    .q      (qb),
    .dout   (dout)
  );

  // The single inverting delay between the two clock lines.
  assign a_clk_in = ~b_clk_out;

  c2_pipeline #(.STAGES(STAGES_A), .WIDTH(WIDTH)) u_a (
    .clk_in (a_clk_in),
    .din    (din),
    .clk_out(clk_out),
    .q      (qa),
    .dout   (mid)
  );

endmodule
