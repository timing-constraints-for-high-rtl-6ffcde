// tb_c2_top: end-to-end test of c2_top at its default sizes (1920-pixel
// lines).
//
// The test plays the 2D-FIFO: after each rising edge of c5 it puts a new
// random pixel on each of the two unit buses.  In every low phase of clk it
// checks all ten taps.  Tap 0 must be the pixel put out two rising edges
// back, and tap j the one j*1920 pixels before that.  The tap checks cover:
//   direct data forwarding (taps 0, 2 and 4),
//   split forwarding through an extra latch (taps 1 and 3),
//   the fork and join of units I and II (both units on one clock edge).
// The same clock drives the other examples.  Each is checked against a
// model built here:
//   MAC: accumulation by data backwarding, and reset through the 2-MUX;
//   synchronization interface, sequential connection, pipeline fork/join.
// Each mechanism's successful checks are counted.  A mechanism that never
// happened counts as a failure.
`timescale 1ns/1ps
module tb_c2_top;
  import c2_pkg::*;
  localparam int L      = LINE_PIXELS;
  localparam int CYCLES = 5 * L + 200;

  int checks = 0, failures = 0;
  int n_fwd_direct = 0, n_fwd_split = 0, n_lmu_join = 0;
  int n_mac_accum = 0, n_mac_reset = 0, n_sync = 0, n_seq = 0, n_fj = 0;

  logic   clk = 1'b0, rst;
  pixel_t d3_i, d3_ii;
  logic   c5;
  pixel_t d2 [LMU_TAPS];
  pixel_t d1 [LMU_TAPS];
  logic        mac_clr;
  logic [7:0]  mac_a, mac_b, sync_din, sync_dout, seq_din, seq_dout, fj_din, fj_dl, fj_ds;
  logic [23:0] mac_acc;
  logic        seq_clk_out, fj_clk_out;

  c2_top dut (
    .clk(clk), .rst(rst), .d3_i(d3_i), .d3_ii(d3_ii), .c5(c5), .d2(d2), .d1(d1),
    .mac_clr(mac_clr), .mac_a(mac_a), .mac_b(mac_b), .mac_acc(mac_acc),
    .sync_din(sync_din), .sync_dout(sync_dout),
    .seq_din(seq_din), .seq_clk_out(seq_clk_out), .seq_dout(seq_dout),
    .fj_din(fj_din), .fj_clk_out(fj_clk_out), .fj_dout_long(fj_dl), .fj_dout_short(fj_ds)
  );

  always #5 clk = ~clk;

  pixel_t      hist_i [$], hist_ii [$];
  logic [7:0]  seq_cap [$], sync_cap [$], fj_cap [$];
  logic [23:0] mac_exp [$];
  logic        mac_clr_hist [$];
  logic [23:0] ref_sum = '0;
  int          edges = 0;
  bit          running = 1'b0;

  task automatic expect_eq(input logic [31:0] got, input logic [31:0] exp,
                           input string what, ref int counter);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s at edge %0d: got %h expected %h", what, edges, got, exp);
    end else begin
      counter++;
    end
  endtask

  initial begin
    #(20 * CYCLES + 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    d3_i = '0; d3_ii = '0;
    mac_clr = 1'b1; mac_a = '0; mac_b = '0;
    sync_din = '0; seq_din = '0; fj_din = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    running = 1'b1;
  end

  // Rising edge of clk (= c5): inputs taken here are recorded, new ones driven.
  always @(posedge clk) begin
    if (running) begin
      edges++;
      // MAC operands taken at this edge.
      mac_clr_hist.push_back(mac_clr);
      if (mac_clr) ref_sum = 24'(mac_a * mac_b);
      else         ref_sum = ref_sum + 24'(mac_a * mac_b);
      mac_exp.push_back(ref_sum);
      seq_cap.push_back(seq_din);
      #1;
      d3_i  = pixel_t'($urandom);
      d3_ii = pixel_t'($urandom);
      hist_i.push_back(d3_i);
      hist_ii.push_back(d3_ii);
      mac_clr = (edges % 13 == 0) || ($urandom_range(0, 19) == 0);
      mac_a   = 8'($urandom);
      mac_b   = 8'($urandom);
      seq_din = 8'($urandom);
      #3;  // middle of the high phase: fork/join and sync outputs are stable
      if (fj_cap.size() >= 3) expect_eq(32'(fj_dl), 32'(fj_cap[fj_cap.size()-3]), "fork/join long", n_fj);
      if (fj_cap.size() >= 1) expect_eq(32'(fj_ds), 32'(fj_cap[fj_cap.size()-1]), "fork/join short", n_fj);
      if (sync_cap.size() >= 2) expect_eq(32'(sync_dout), 32'(sync_cap[sync_cap.size()-2]), "sync interface", n_sync);
    end
  end

  always @(negedge clk) begin
    if (running) begin
      int n;
      sync_cap.push_back(sync_din);
      fj_cap.push_back(fj_din);
      #1;
      sync_din = 8'($urandom);
      fj_din   = 8'($urandom);
      // Line memory taps (output latches closed at this falling edge).
      n = hist_i.size();
      checks++;
      if (c5 !== clk) begin failures++; $display("FAIL c5 phase"); end
      for (int j = 0; j < LMU_TAPS; j++) begin
        if (n - 2 - j * L >= 0) begin
          if (j % 2 == 0) begin
            expect_eq(32'(d2[j]), 32'(hist_i[n-2-j*L]),  $sformatf("unit I tap %0d", j),  n_fwd_direct);
            expect_eq(32'(d1[j]), 32'(hist_ii[n-2-j*L]), $sformatf("unit II tap %0d", j), n_fwd_direct);
          end else begin
            expect_eq(32'(d2[j]), 32'(hist_i[n-2-j*L]),  $sformatf("unit I tap %0d", j),  n_fwd_split);
            expect_eq(32'(d1[j]), 32'(hist_ii[n-2-j*L]), $sformatf("unit II tap %0d", j), n_fwd_split);
          end
          if (j == LMU_TAPS - 1) n_lmu_join++;
        end
      end
      // MAC: result of the operands taken one rising edge before the last.
      n = mac_exp.size();
      if (n >= 2) begin
        if (mac_clr_hist[n-2]) expect_eq(32'(mac_acc), 32'(mac_exp[n-2]), "mac reset", n_mac_reset);
        else                   expect_eq(32'(mac_acc), 32'(mac_exp[n-2]), "mac accumulate", n_mac_accum);
      end
      // Sequential connection: 8 latches, 4 rising edges.
      n = seq_cap.size();
      if (n >= 4) expect_eq(32'(seq_dout), 32'(seq_cap[n-4]), "sequential", n_seq);
      if (edges >= CYCLES) begin
        $display("direct forwarding %0d, split forwarding %0d, unit join %0d",
                 n_fwd_direct, n_fwd_split, n_lmu_join);
        $display("mac accumulate %0d, mac reset %0d, sync %0d, sequential %0d, fork/join %0d",
                 n_mac_accum, n_mac_reset, n_sync, n_seq, n_fj);
        if (n_fwd_direct == 0) begin failures++; $display("FAIL direct forwarding never checked"); end
        if (n_fwd_split  == 0) begin failures++; $display("FAIL split forwarding never checked"); end
        if (n_lmu_join   == 0) begin failures++; $display("FAIL 4-line tap never reached"); end
        if (n_mac_accum  == 0) begin failures++; $display("FAIL backwarding never used"); end
        if (n_mac_reset  == 0) begin failures++; $display("FAIL mac reset never used"); end
        if (n_sync == 0 || n_seq == 0 || n_fj == 0) begin
          failures++; $display("FAIL a composition example was never checked");
        end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
