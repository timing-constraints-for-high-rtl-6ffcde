// line_memory_unit: a line memory unit in C2 pipelining, delivering the
// current pixel together with the pixels 1, 2, 3 and 4 lines above it.
//
// Four line memory blocks are chained.  Each sits on its own node of an
// inverting clock line that carries the unit clock upstream:
//
//   clk_in -> inv -> C5 -> inv -> C4 -> inv -> C3 -> inv -> C2 -> inv -> C1 -> inv -> C0
//
// C0 (clk_out) clocks the input latch that sits outside the unit; block j
// runs on Cj; the five-tap output latch runs on C5.  Data may jump forward
// from node a to node b directly only when b-a is odd (the destination then
// opens in the phase after the source closes).  So:
//   tap 0: input (C0) -> C5, distance 5, direct      ("data forwarding 1")
//   tap 1: block 1 (C1) -> extra latch C2 -> C5      ("data forwarding 2", 4 = 1 + 3)
//   tap 2: block 2 (C2) -> C5, distance 3, direct
//   tap 3: block 3 (C3) -> extra latch C4 -> C5      (2 = 1 + 1)
//   tap 4: block 4 (C4) -> C5, distance 1, direct
// The structure and the two forwarding rules are the document's.  The extra
// latch on tap 3 is read from the figure.  The block depths are this
// design's choice: blocks on odd nodes hold LINE_LEN-1 pixels, those on even
// nodes LINE_LEN.  This balances the extra half-cycle hops so that the taps
// are exactly 0..4 lines apart.
//
// Interface: clk_in, rst (clears the block addresses), din (stable while C0
// is low, i.e. driven by a latch on clk_out), clk_out, taps[0..4].
// Timing: C5 = ~clk_in.  taps are updated while C5 is high (clk_in low) and
// held while clk_in is high.  When the output latch closes, taps[j] is the
// pixel j*LINE_LEN samples older than taps[0], and taps[0] is the pixel that
// din held during that same clock low phase.
module line_memory_unit
  import c2_pkg::*;
#(
  parameter int unsigned WIDTH    = PIXEL_W,
  parameter int unsigned LINE_LEN = LINE_PIXELS
) (
  input  logic             clk_in,
  input  logic             rst,
  input  logic [WIDTH-1:0] din,
  output logic             clk_out,
  output logic [WIDTH-1:0] taps [LMU_TAPS]
);

  localparam int unsigned NODES = LMU_BLOCKS + 2;  // C0 .. C5

  logic             clk_c5;
  logic [NODES-1:0] c;           // c[k] = clock node Ck
  logic [WIDTH-1:0] blk [LMU_BLOCKS+1];  // blk[j] = output of block j, blk[0] = din
  logic [WIDTH-1:0] fwd [LMU_TAPS];      // tap values arriving at the output latch

  // Inverting delay between the unit clock input and node C5.
  assign clk_c5 = ~clk_in;

  c2_clock_line #(.NODES(NODES), .INVERTING(1'b1)) u_clk (
    .clk_in (clk_c5),
    .node   (c),
    .clk_out(clk_out)
  );

  assign blk[0] = din;

  for (genvar j = 1; j <= LMU_BLOCKS; j++) begin : g_block
    line_memory_block #(.WIDTH(WIDTH), .DEPTH(lmb_depth(LINE_LEN, j))) u_lmb (
      .clk (c[j]),
      .rst (rst),
      .din (blk[j-1]),
      .dout(blk[j])
    );
  end

  // Forwarding from node j to the output node NODES-1.
  for (genvar j = 0; j <= LMU_BLOCKS; j++) begin : g_fwd
    if (((NODES - 1 - j) % 2) == 1) begin : g_direct
      assign fwd[j] = blk[j];
    end else begin : g_split
      // Even distance: one extra latch on the next node makes both hops odd.
      c2_latch #(.WIDTH(WIDTH)) u_extra (.en(c[j+1]), .d(blk[j]), .q(fwd[j]));
    end
  end

  for (genvar j = 0; j < LMU_TAPS; j++) begin : g_out
    c2_latch #(.WIDTH(WIDTH)) u_out (.en(c[NODES-1]), .d(fwd[j]), .q(taps[j]));
  end

endmodule
