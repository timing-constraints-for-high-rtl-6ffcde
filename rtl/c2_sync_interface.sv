// c2_sync_interface: runs a C2 pipeline inside a conventionally clocked
// system, so that its input and its output both keep time with one clock.
//
// The input latch runs directly on clk (open while clk is high).  The
// pipeline's clock line is fed with clk1, an inverted and delayed copy of clk
// brought to the pipeline's downstream end; the clock then travels upstream
// through the pipeline's own inverting delays.  Its first latch is therefore
// STAGES inversions away from clk, an even number, and sits in the same
// phase as the input latch.  The input latch hands data to it by data
// backwarding (an even clock distance), which is safe because the delayed
// clock closes the pipeline latch after the input latch has closed.  The
// last latch runs on clk1 and is open while clk is low.  Its output is
// therefore stable while clk is high, when a receiver clocked by clk can
// take it.  The structure follows the document.  STAGES (4) is this design's
// choice and must be even.
//
// Interface: clk, din, dout.
// Timing: din is taken when clk falls.  dout shows it STAGES/2 - 1 clock
// periods later, from a falling edge of clk, and holds it for one period.
module c2_sync_interface #(
  parameter int unsigned STAGES = 4,
  parameter int unsigned WIDTH  = 8
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  if (STAGES % 2 != 0) begin : g_bad_stages
    $error("c2_sync_interface: STAGES must be even");
  end

  logic             clk1;
  logic             clk_out;   // pipeline's outgoing clock, ends here
  logic [WIDTH-1:0] in_q;
  logic [WIDTH-1:0] q [STAGES];

  // Input latch on the system clock.
  c2_latch #(.WIDTH(WIDTH)) u_in (.en(clk), .d(din), .q(in_q));

  // clk1: inverted (and, in silicon, delayed) system clock.
  assign clk1 = ~clk;

  c2_pipeline #(.STAGES(STAGES), .WIDTH(WIDTH)) u_pipe (
    .clk_in (clk1),
    .din    (in_q),
    .clk_out(clk_out),
    .q      (q),
    .dout   (dout)
  );

endmodule
