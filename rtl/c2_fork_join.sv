// c2_fork_join: two C2 pipelines of different length working in parallel
// (pipeline fork and join).
//
// Both pipelines take the clock at their downstream ends from the same clk,
// so their last latches line up.  Their first latches do not: the first latch
// of the short pipeline lines up with latch LONG-SHORT of the long one.  A
// fork latch, clocked by the long pipeline's outgoing clock through one
// inverting delay, feeds both.  It feeds the long pipeline as an ordinary
// neighbour, and the short pipeline by data forwarding over LONG-SHORT+1
// nodes.  If that distance is even, one extra latch on the long pipeline's
// first node splits the jump into two odd ones.  The short pipeline's
// outgoing clock is terminated.  The fork latch's clock is the one handed
// upstream, because it lies on the long pipeline's clock line, whose timing
// suits the incoming data.  The structure follows the document.  The
// lengths (6 and 2) are this design's choice.
//
// Interface: clk, din (stable while clk_out is low), clk_out (fork latch
// clock, handed upstream), dout_long, dout_short.
// Timing: after the fork latch closes, dout_short shows the datum SHORT-1
// half periods later and dout_long LONG-1 half periods later.
module c2_fork_join #(
  parameter int unsigned LONG  = 6,
  parameter int unsigned SHORT = 2,
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] din,
  output logic             clk_out,
  output logic [WIDTH-1:0] dout_long,
  output logic [WIDTH-1:0] dout_short
);

  if (SHORT > LONG || SHORT == 0) begin : g_bad_len
    $error("c2_fork_join: need 0 < SHORT <= LONG");
  end

  logic             long_clk_out, short_clk_out;
  logic [WIDTH-1:0] fork_q, short_d;
  logic [WIDTH-1:0] ql [LONG];
  logic [WIDTH-1:0] qs [SHORT];

  c2_pipeline #(.STAGES(LONG), .WIDTH(WIDTH)) u_long (
    .clk_in (clk),
    .din    (fork_q),
    .clk_out(long_clk_out),
    .q      (ql),
    .dout   (dout_long)
  );

  // One inverting delay from the long pipeline's first node to the fork latch.
  assign clk_out = ~long_clk_out;
  c2_latch #(.WIDTH(WIDTH)) u_fork (.en(clk_out), .d(din), .q(fork_q));

  // Data forwarding into the short pipeline.
  if (((LONG - SHORT + 1) % 2) == 1) begin : g_direct
    assign short_d = fork_q;
  end else begin : g_split
    c2_latch #(.WIDTH(WIDTH)) u_extra (.en(long_clk_out), .d(fork_q), .q(short_d));
  end

  c2_pipeline #(.STAGES(SHORT), .WIDTH(WIDTH)) u_short (
    .clk_in (clk),
    .din    (short_d),
    .clk_out(short_clk_out),    // terminated
    .q      (qs),
    .dout   (dout_short)
  );

endmodule
