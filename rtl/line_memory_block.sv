// line_memory_block: one line memory of the line memory unit.
//
// Delays a pixel stream by DEPTH samples.  It is a circular buffer: on each
// rising edge of its local clock it reads the oldest pixel into its output
// register and writes the new pixel into the same slot.  The document gives
// only the block's function (one line of delay); the circular buffer and its
// depth are this design's choice.
//
// The block sits on one node of a C2 clock line.  Its rising clock edge is
// the moment a latch on that node would open: its input, coming from the
// opposite-phase node upstream, is stable then, and its output changes while
// the downstream opposite-phase latches are opaque.  It therefore behaves
// like a pipeline latch on that node with DEPTH samples of storage.
//
// Interface: clk (local clock node), rst (synchronous, clears the address
// only; the document does not mention a reset), din, dout.
// Timing: dout after edge t equals din sampled at edge t-DEPTH.
module line_memory_block #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 1920
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    addr;

  always_ff @(posedge clk) begin
    if (rst) begin
      addr <= '0;
    end else begin
      addr <= (addr == AW'(DEPTH - 1)) ? '0 : addr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    dout      <= mem[addr];
    mem[addr] <= din;
  end

endmodule
