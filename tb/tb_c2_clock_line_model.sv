// tb_c2_clock_line_model: the C2 clock line with real inverter delays, and
// the forwarding and backwarding limits that follow from it.  The numbers are
// the worked example of the scheme: inverter delay d_c = 1 ns, clock phase
// P = 50 ns, which allow data to skip about 50 stages.
//
// Part 1, edge ripple: after a rising edge of the input clock, node k must
// switch (NODES-1-k)*d_c later, with the polarity of (NODES-1-k)
// inversions.
//
// Part 2, forwarding: a source latch on node 0 feeds latches on every odd
// node k directly.  The source shows a wrong value at the start of its
// transparent phase and the correct one only 0.5 ns before it closes.  The
// destination on node k closes k*d_c before the source reopens, so it takes
// the correct value only if k*d_c < P - 0.5 ns (odd k up to 49) and the
// wrong one beyond.
//
// Part 3, backwarding: a source latch on node NODES-1 feeds latches on nodes
// NODES-1-2m.  The source holds the correct value while it is opaque and
// shows a wrong value 0.5 ns after it reopens.  The destination closes 2m*d_c
// after the source closes, so it keeps the correct value only if
// 2m*d_c < P + 0.5 ns (2m up to 50).  Beyond that it takes the wrong value,
// or, past a whole clock period, the next datum.  Both count as a miss.
//
// Part 4, staggered pipeline: eight latches with 10 ns of logic between
// them, clocked from the delayed line, must deliver every datum, in order.
`timescale 1ns/1ps
module tb_c2_clock_line_model;
  localparam int  N     = 64;
  localparam real DC    = 1.0;
  localparam real P     = 50.0;
  localparam logic [7:0] WRONG = 8'h80;

  int checks = 0, failures = 0;
  logic         clk = 1'b0;
  logic [N-1:0] node;
  logic         clk_out;

  c2_clock_line_model #(.NODES(N), .INVERTING(1'b1), .DC_NS(DC)) dut (
    .clk_in(clk), .node(node), .clk_out(clk_out));

  always #(P * 1ns) clk = ~clk;

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- Part 1: edge ripple ------------------------------------------------
  initial begin
    #(10 * 2 * P * 1ns);
    @(posedge clk);
    for (int k = N - 1; k >= 0; k--) begin
      logic exp_after;
      exp_after = ((N - 1 - k) % 2 == 1) ? 1'b0 : 1'b1;
      // Wait until just before and just after node k's edge.
      #((DC * 0.5) * 1ns);
      checks++;
      if (node[k] !== exp_after) begin
        failures++;
        $display("FAIL node %0d not yet switched at +%0.1f", k, (N - 1 - k) * DC + 0.5);
      end
      if (k > 0) begin
        checks++;
        if (node[k-1] !== exp_after) begin
          failures++;
          $display("FAIL node %0d switched too early", k - 1);
        end
      end
      #((DC * 0.5) * 1ns);
    end
  end

  // ---- Part 2: forwarding from node 0 ---------------------------------------
  logic [7:0] fsrc_d, fsrc_q, fcur;
  logic [7:0] fdst_q [N];
  int         f_ok [N], f_bad [N];
  bit         armed = 1'b0;

  c2_latch #(.WIDTH(8)) u_fsrc (.en(node[0]), .d(fsrc_d), .q(fsrc_q));

  always @(posedge node[0]) begin
    #0.5 fsrc_d = WRONG;
    #((P - 1.0) * 1ns) begin
      fsrc_d = (fcur + 8'd1) & 8'h7f;
      fcur   = fsrc_d;
    end
  end

  for (genvar k = 1; k < N; k += 2) begin : g_fdst
    c2_latch #(.WIDTH(8)) u_dst (.en(node[k]), .d(fsrc_q), .q(fdst_q[k]));
    always @(negedge node[k]) begin
      #0.1;
      if (armed) begin
        if (fdst_q[k] === fcur) f_ok[k]++;
        else                    f_bad[k]++;
      end
    end
  end

  // ---- Part 3: backwarding from node N-1 ------------------------------------
  logic [7:0] bsrc_d, bsrc_q, bcur, bheld;

  // The value the source held through its last opaque phase.
  always @(negedge node[N-1]) #0.05 bheld = bsrc_q;
  logic [7:0] bdst_q [N];
  int         b_ok [N], b_bad [N];

  c2_latch #(.WIDTH(8)) u_bsrc (.en(node[N-1]), .d(bsrc_d), .q(bsrc_q));

  always @(posedge node[N-1]) begin
    #0.5 bsrc_d = WRONG;
    #(9.5 * 1ns) begin
      bsrc_d = (bcur + 8'd1) & 8'h7f;
      bcur   = bsrc_d;
    end
  end

  for (genvar m = 1; 2 * m <= N - 1; m++) begin : g_bdst
    localparam int D = N - 1 - 2 * m;
    c2_latch #(.WIDTH(8)) u_dst (.en(node[D]), .d(bsrc_q), .q(bdst_q[D]));
    always @(negedge node[D]) begin
      #0.1;
      if (armed) begin
        if (bdst_q[D] === bheld) b_ok[D]++;
        else                     b_bad[D]++;
      end
    end
  end


  // ---- Part 4: a pipeline with data paths on the delayed clock line ---------
  // Eight latches on their own 8-node line, with an increment stage of 10 ns
  // between neighbours (the general architecture with logic between the
  // latches).  The first latch gets a new counter value after each of its
  // closing edges.  At each closing of the last latch the output must be
  // the previous output plus one, and the input it came from plus 7.
  localparam int  N4 = 8;
  localparam real DP = 10.0;
  logic [N4-1:0] node4;
  logic          clk_out4;
  logic [7:0]    p_in = 8'd0;
  logic [7:0]    p_q [N4];
  logic [7:0]    p_d [N4];
  logic [7:0]    p_last;
  bit            p_have = 1'b0;
  int            p_seen = 0;

  c2_clock_line_model #(.NODES(N4), .INVERTING(1'b1), .DC_NS(DC)) u_line4 (
    .clk_in(clk), .node(node4), .clk_out(clk_out4));

  assign p_d[0] = p_in;
  for (genvar k = 0; k < N4; k++) begin : g_pipe
    if (k > 0) begin : g_logic
      assign #(DP * 1ns) p_d[k] = p_q[k-1] + 8'd1;
    end
    c2_latch #(.WIDTH(8)) u_lat (.en(node4[k]), .d(p_d[k]), .q(p_q[k]));
  end

  always @(negedge node4[0]) #0.5 p_in = p_in + 8'd1;

  always @(negedge node4[N4-1]) begin
    #0.1;
    if (armed) begin
      checks++;
      if (p_have && p_q[N4-1] !== p_last + 8'd1) begin
        failures++;
        $display("FAIL pipeline output %0d after %0d", p_q[N4-1], p_last);
      end
      checks++;
      if (8'(p_in - p_q[N4-1] + 8'd7) > 8'd4) begin
        failures++;
        $display("FAIL pipeline output %0d too far from input %0d", p_q[N4-1], p_in);
      end
      p_have = 1'b1;
      p_seen++;
    end
    p_last = p_q[N4-1];
  end

  // ---- Verdict -------------------------------------------------------------
  initial begin
    int max_fwd, max_bwd;
    fsrc_d = 8'h00; bsrc_d = 8'h00; fcur = 8'h00; bcur = 8'h00; bheld = 8'h00;
    for (int k = 0; k < N; k++) begin f_ok[k] = 0; f_bad[k] = 0; b_ok[k] = 0; b_bad[k] = 0; end
    #(5 * 2 * P * 1ns);
    armed = 1'b1;
    #(20 * 2 * P * 1ns);
    armed = 1'b0;
    max_fwd = 0;
    for (int k = 1; k < N; k += 2) begin
      bit should_pass;
      should_pass = (k * DC < P - 0.5);
      checks++;
      if (should_pass ? (f_ok[k] < 10 || f_bad[k] != 0) : (f_bad[k] < 10 || f_ok[k] != 0)) begin
        failures++;
        $display("FAIL forward k=%0d ok=%0d wrong=%0d expected %s", k, f_ok[k], f_bad[k],
                 should_pass ? "correct" : "wrong");
      end
      if (f_ok[k] > 0 && f_bad[k] == 0) max_fwd = k;
    end
    max_bwd = 0;
    for (int m = 1; 2 * m <= N - 1; m++) begin
      bit should_pass;
      int d;
      d = N - 1 - 2 * m;
      should_pass = (2 * m * DC < P + 0.5);
      checks++;
      if (should_pass ? (b_ok[d] < 10 || b_bad[d] != 0) : (b_bad[d] < 10 || b_ok[d] != 0)) begin
        failures++;
        $display("FAIL backward 2m=%0d ok=%0d wrong=%0d expected %s", 2 * m, b_ok[d], b_bad[d],
                 should_pass ? "correct" : "wrong");
      end
      if (b_ok[d] > 0 && b_bad[d] == 0) max_bwd = 2 * m;
    end
    checks++;
    if (p_seen < 10) begin failures++; $display("FAIL pipeline not observed"); end
    $display("longest safe forward skip %0d stages, longest safe backward skip %0d stages (d_c=%0.1f ns, P=%0.1f ns)",
             max_fwd, max_bwd, DC, P);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
