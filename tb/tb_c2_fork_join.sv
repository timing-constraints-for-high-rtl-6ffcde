// tb_c2_fork_join: fork and join of a 6-latch and a 2-latch C2 pipeline.
// The fork latch runs on clk_out (= clk) and takes din at each falling edge.
// The short pipeline is reached by direct forwarding over 5 nodes.  In the
// middle of each high phase, dout_short must hold the datum taken at the
// previous falling edge (1 half period) and dout_long the one taken three
// falling edges back (5 half periods).
`timescale 1ns/1ps
module tb_c2_fork_join;
  int checks = 0, failures = 0;
  logic       clk = 1'b0, clk_out;
  logic [7:0] din, dl, ds;
  logic [7:0] cap [$];

  c2_fork_join #(.LONG(6), .SHORT(2), .WIDTH(8)) dut (
    .clk(clk), .din(din), .clk_out(clk_out), .dout_long(dl), .dout_short(ds));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    cap.push_back(din);
    #1 din = 8'($urandom);
  end

  always @(posedge clk) begin
    int n;
    #2;
    n = cap.size();
    checks++;
    if (clk_out !== clk) begin
      failures++;
      $display("FAIL clk_out phase");
    end
    if (n >= 1) begin
      checks++;
      if (ds !== cap[n-1]) begin
        failures++;
        $display("FAIL short n=%0d dout=%h exp=%h", n, ds, cap[n-1]);
      end
    end
    if (n >= 3) begin
      checks++;
      if (dl !== cap[n-3]) begin
        failures++;
        $display("FAIL long n=%0d dout=%h exp=%h", n, dl, cap[n-3]);
      end
    end
    if (n == 300) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial din = 8'h33;
endmodule
