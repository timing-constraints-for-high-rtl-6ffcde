// mac_unit: multiply-and-accumulate unit in C2 pipelining, with the result
// fed back by data backwarding (modified form, without extra latches).
//
// Four latch ranks, top to bottom along the data flow:
//   L1: operands a, b (and the clear flag that travels with them)
//   multiplier
//   L2: product (and clear flag)
//   adder: sum = product + (clr ? 0 : acc)   <- 2-MUX on the backwarded result
//   L3, L4: back-to-back latches holding the accumulator (acc = L4)
// The clock enters at L4 and climbs through inverting delays:
// c4 = clk, c3 = ~c4, c2 = ~c3, c1 = ~c2.  L4 sends its value back two
// nodes, to the adder in front of L3, which is legal because the distance is
// even.  In silicon, the 2-MUX and its restoring inverter give the extra
// delay d_b > 2 d_c that keeps the returning value from racing the clock.
// The document gives the latch ranks, the clock line, the backwarding path
// and the reset/accumulate MUX.  The operand and accumulator widths and the
// clear flag travelling down with the operands are this design's choice.
//
// The loop L4 -> MUX -> adder -> L3 -> L4 looks like a combinational loop to
// a lint tool.  It never is one, because L3 and L4 are open in opposite clock
// phases.
//
// Interface: clk, clr (start a new sum with this product), a, b, acc.
// Timing: a, b and clr must be stable while clk is low; they are taken when
// clk rises.  acc then shows the new sum from the next rising edge of clk
// until the one after (one result per clock cycle, one cycle of latency).
module mac_unit #(
  parameter int unsigned A_W   = 8,
  parameter int unsigned B_W   = 8,
  parameter int unsigned ACC_W = 24
) (
  input  logic             clk,
  input  logic             clr,
  input  logic [A_W-1:0]   a,
  input  logic [B_W-1:0]   b,
  output logic [ACC_W-1:0] acc
);

  localparam int unsigned P_W = A_W + B_W;

  typedef struct packed {
    logic           clr;
    logic [A_W-1:0] a;
    logic [B_W-1:0] b;
  } l1_t;

  typedef struct packed {
    logic           clr;
    logic [P_W-1:0] p;
  } l2_t;

  logic [3:0] c;            // c[0] = L1 clock ... c[3] = L4 clock
  logic       c_out;        // outgoing clock at L1, unused upstream
  l1_t        l1_d, l1_q;
  l2_t        l2_d, l2_q;
  logic [ACC_W-1:0] back, sum, l3_q;

  c2_clock_line #(.NODES(4), .INVERTING(1'b1)) u_clk (
    .clk_in (clk),
    .node   (c),
    .clk_out(c_out)
  );

  assign l1_d = '{clr: clr, a: a, b: b};
  c2_latch #(.WIDTH($bits(l1_t))) u_l1 (.en(c[0]), .d(l1_d), .q(l1_q));

  // Multiplication stage.
  assign l2_d = '{clr: l1_q.clr, p: P_W'(l1_q.a) * P_W'(l1_q.b)};
  c2_latch #(.WIDTH($bits(l2_t))) u_l2 (.en(c[1]), .d(l2_d), .q(l2_q));

  // Data backwarding from L4 through the reset/accumulate 2-MUX.
  assign back = l2_q.clr ? '0 : acc;

  // Addition stage.
  assign sum = ACC_W'(l2_q.p) + back;
  c2_latch #(.WIDTH(ACC_W)) u_l3 (.en(c[2]), .d(sum),  .q(l3_q));
  c2_latch #(.WIDTH(ACC_W)) u_l4 (.en(c[3]), .d(l3_q), .q(acc));

endmodule
