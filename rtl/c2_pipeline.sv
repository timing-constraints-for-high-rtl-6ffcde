// c2_pipeline: the basic C2 (counterflow-clocked) pipeline.
//
// STAGES latches in a row carry data from latch 0 (upstream) to latch
// STAGES-1 (downstream).  Their clocks come from an inverting clock line fed
// at the downstream end, so the clock flows against the data and
// neighbouring latches are open in opposite phases.  Data paths between the
// latches are blank, as in the document's basic architecture; a latch pair
// with logic between them obeys the same timing.
//
// Interface: clk_in (clock at the downstream end), din (input of latch 0),
// clk_out (clock of latch 0, handed upstream), q[k] (output of latch k),
// dout (= q[STAGES-1]).
//
// Timing: latch 0 captures din when its clock falls; latch k then shows that
// datum k-1 half clock periods later, so dout carries it (STAGES-2) half
// periods after latch 0 closes and holds it for one period.  With STAGES even,
// latch 0 closes on the rising edge of clk_in.
module c2_pipeline #(
  parameter int unsigned STAGES = 4,
  parameter int unsigned WIDTH  = 8
) (
  input  logic             clk_in,
  input  logic [WIDTH-1:0] din,
  output logic             clk_out,
  output logic [WIDTH-1:0] q [STAGES],
  output logic [WIDTH-1:0] dout
);

  logic [STAGES-1:0] node;

  c2_clock_line #(.NODES(STAGES), .INVERTING(1'b1)) u_clk (
    .clk_in (clk_in),
    .node   (node),
    .clk_out(clk_out)
  );

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    logic [WIDTH-1:0] d;
    if (k == 0) begin : g_first
      assign d = din;
    end else begin : g_next
      assign d = q[k-1];
    end
    c2_latch #(.WIDTH(WIDTH)) u_lat (.en(node[k]), .d(d), .q(q[k]));
  end

  assign dout = q[STAGES-1];

endmodule
