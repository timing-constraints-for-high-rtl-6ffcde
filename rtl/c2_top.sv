// c2_top: counterflow-clocked (C2) designs side by side.
//
// 1. The line memory section of a subband filtering chip for HDTV images.
//    Two line memory units (I and II) work in parallel: a pipeline fork and
//    join.  The chip clock clk enters at the filterbank end.  One inverting
//    delay drives c1 into unit II and c3 into unit I.  The clock comes out of
//    unit II as c2, which is terminated.  It comes out of unit I as c4,
//    which drives the upstream side: one more inverting delay makes c5, the
//    clock handed to the 2D-FIFO that supplies the pixels.  Each unit gets
//    its 8-bit pixel bus (d3) through an input latch on its own outgoing
//    clock (c4, c2).  Each delivers five taps, pixels delayed by 0..4 lines,
//    on buses d2 (unit I) and d1 (unit II) to the filterbank.  The 2D-FIFO
//    and the filterbank are not part of this RTL.  Their buses and clocks
//    are ports of this module.
// 2. The multiply-and-accumulate example with data backwarding (mac_*).
// 3. The synchronization interface, a C2 pipeline working to a conventional
//    clock (sync_*).
// 4. The sequential connection of two C2 pipelines (seq_*) and the fork and
//    join of a long and a short one (fj_*).
// Designs 2..4 share nothing with design 1 but the clock.
// Lint reports a combinational loop through mac_acc: it is the MAC's
// accumulator feedback, which is cut by latches L3 and L4, open in opposite
// phases (see mac_unit).
//
// The unit arrangement, clock names and bus widths follow the chip's floor
// plan.  Feeding each unit from its own 8-bit bus, and the latch in front
// of each unit, are this design's choices.
//
// Timing of design 1: c4 = c2 = ~clk and c5 = clk.  d3_i and d3_ii must be
// stable while clk is low and at its rising edge.  The 2D-FIFO launches them
// from the rising edge of c5, after its own output delay.  The taps change
// while clk is high and are stable while clk is low.
// Tap j of a unit lags tap 0 by exactly j * LINE_LEN pixels.
// Timing of the others: see mac_unit, c2_sync_interface, c2_sequential and
// c2_fork_join.
module c2_top
  import c2_pkg::*;
#(
  parameter int unsigned LINE_LEN = LINE_PIXELS
) (
  input  logic   clk,
  input  logic   rst,
  // Line memory section
  input  pixel_t d3_i,                    // from 2D-FIFO to unit I
  input  pixel_t d3_ii,                   // from 2D-FIFO to unit II
  output logic   c5,                      // clock to the 2D-FIFO
  output pixel_t d2 [LMU_TAPS],           // unit I taps, to the filterbank
  output pixel_t d1 [LMU_TAPS],           // unit II taps, to the filterbank
  // MAC example
  input  logic         mac_clr,
  input  logic [7:0]   mac_a,
  input  logic [7:0]   mac_b,
  output logic [23:0]  mac_acc,
  // Synchronization interface example
  input  logic [7:0]   sync_din,
  output logic [7:0]   sync_dout,
  // Sequential connection example
  input  logic [7:0]   seq_din,
  output logic         seq_clk_out,
  output logic [7:0]   seq_dout,
  // Fork and join example
  input  logic [7:0]   fj_din,
  output logic         fj_clk_out,
  output logic [7:0]   fj_dout_long,
  output logic [7:0]   fj_dout_short
);

  // ---- 1. Line memory section -------------------------------------------
  logic   c1, c3;      // unit clocks, one inverting delay from clk
  logic   c2, c4;      // outgoing clocks of units II and I
  pixel_t din_i, din_ii;

  assign c1 = ~clk;
  assign c3 = ~clk;

  c2_latch #(.WIDTH(PIXEL_W)) u_in_i  (.en(c4), .d(d3_i),  .q(din_i));
  c2_latch #(.WIDTH(PIXEL_W)) u_in_ii (.en(c2), .d(d3_ii), .q(din_ii));

  line_memory_unit #(.WIDTH(PIXEL_W), .LINE_LEN(LINE_LEN)) u_lmu_i (
    .clk_in (c3),
    .rst    (rst),
    .din    (din_i),
    .clk_out(c4),
    .taps   (d2)
  );

  line_memory_unit #(.WIDTH(PIXEL_W), .LINE_LEN(LINE_LEN)) u_lmu_ii (
    .clk_in (c1),
    .rst    (rst),
    .din    (din_ii),
    .clk_out(c2),      // terminated beyond the input latch
    .taps   (d1)
  );

  // The longer clock path (c3 -> c4) is the one that feeds upstream.
  assign c5 = ~c4;

  // ---- 2..4. Other examples ------------------------------------------------
  mac_unit #(.A_W(8), .B_W(8), .ACC_W(24)) u_mac (
    .clk(clk), .clr(mac_clr), .a(mac_a), .b(mac_b), .acc(mac_acc)
  );

  c2_sync_interface #(.STAGES(4), .WIDTH(8)) u_sync (
    .clk(clk), .din(sync_din), .dout(sync_dout)
  );

  c2_sequential #(.STAGES_A(4), .STAGES_B(4), .WIDTH(8)) u_seq (
    .clk(clk), .din(seq_din), .clk_out(seq_clk_out), .dout(seq_dout)
  );

  c2_fork_join #(.LONG(6), .SHORT(2), .WIDTH(8)) u_fj (
    .clk(clk), .din(fj_din), .clk_out(fj_clk_out),
    .dout_long(fj_dout_long), .dout_short(fj_dout_short)
  );

endmodule
