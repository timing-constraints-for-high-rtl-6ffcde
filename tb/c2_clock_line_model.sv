// c2_clock_line_model: simulation model (not synthesizable) of the C2 clock
// line with its physical delays.  It stands in for c2_clock_line when the
// timing of the scheme itself is under study.
//
// It has the same ports as c2_clock_line: the clock enters at node NODES-1
// and every step upstream passes one inverting delay element of DC_NS
// nanoseconds.  Node k therefore carries clk_in inverted (NODES-1-k) times
// and delayed by (NODES-1-k)*DC_NS: downstream latches see each clock edge
// first, and the edges ripple upstream, against the data.  This spreading of
// the latch switching over the clock phase is what the document relies on.
// It cuts peak supply current and turns clock skew into local one-sided
// constraints.  Those constraints, with wire delays and setup/hold ignored:
//   data forwarding over an odd distance k:   k * DC < P   (phase length P)
//   data backwarding over an even distance k: k * DC < P
// The delay element is the document's; the single fixed DC_NS per element
// (no wire delay, no variation) is this model's simplification.
module c2_clock_line_model #(
  parameter int unsigned NODES     = 4,
  parameter bit          INVERTING = 1'b1,
  parameter real         DC_NS     = 1.0
) (
  input  logic             clk_in,
  output logic [NODES-1:0] node,
  output logic             clk_out
);

  assign node[NODES-1] = clk_in;

  for (genvar k = 0; k < NODES - 1; k++) begin : g_elem
    if (INVERTING) begin : g_inv
      assign #(DC_NS * 1ns) node[k] = ~node[k+1];
    end else begin : g_buf
      assign #(DC_NS * 1ns) node[k] = node[k+1];
    end
  end

  assign clk_out = node[0];

endmodule
