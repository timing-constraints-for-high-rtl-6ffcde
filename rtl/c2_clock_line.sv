// c2_clock_line: the counterflow clock distribution line of a C2 pipeline.
//
// The clock enters at the downstream end of the pipeline (node NODES-1) and
// travels upstream, against the data, through one delay element per stage.
// In the document's main architecture every delay element is an inverter, so
// neighbouring latches get opposite clock phases and each node lags the one
// downstream of it by the element delay d_c; the alternative architecture
// uses non-inverting buffers (INVERTING = 0) with latches of alternating
// polarity, which that architecture handles in the latches, not here.
//
// Interface: clk_in (the clock at the downstream end), node[k] (local clock of
// latch k, k = 0 is the most upstream latch), clk_out (= node[0], the
// outgoing clock handed to a preceding pipeline).
//
// Timing: in RTL the elements have no delay, so node[k] is clk_in inverted
// (NODES-1-k) times.  The delay d_c that makes the scheme safe is a physical
// property of the inverters; it has to satisfy the hold constraint
// d_c > d_slw + H - d_fsw - d_ds between neighbouring stages.  The local
// buffers that drive each latch's load are not modelled (they only amplify).
module c2_clock_line #(
  parameter int unsigned NODES     = 4,
  parameter bit          INVERTING = 1'b1
) (
  input  logic             clk_in,
  output logic [NODES-1:0] node,
  output logic             clk_out
);

  // The chain, written from the downstream end upstream.
  always_comb begin
    node[NODES-1] = clk_in;
    for (int k = int'(NODES) - 2; k >= 0; k--) begin
      node[k] = INVERTING ? ~node[k+1] : node[k+1];
    end
  end

  assign clk_out = node[0];

endmodule
