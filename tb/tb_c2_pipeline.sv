// tb_c2_pipeline: random data through 4- and 6-latch C2 pipelines.
// The first latch of an even-length pipeline closes on the rising edge of
// clk.  A pipeline of S latches shows that datum (S-2) half periods later
// and holds it for one period.  Sampling on the falling edge, dout must
// equal the datum captured S/2 rising edges earlier.
`timescale 1ns/1ps
module tb_c2_pipeline;
  int checks = 0, failures = 0;
  logic       clk = 1'b0;
  logic [7:0] din;
  logic [7:0] cap [$];
  logic       co4, co6;
  logic [7:0] q4 [4];
  logic [7:0] q6 [6];
  logic [7:0] dout4, dout6;

  c2_pipeline #(.STAGES(4), .WIDTH(8)) dut4 (.clk_in(clk), .din(din), .clk_out(co4), .q(q4), .dout(dout4));
  c2_pipeline #(.STAGES(6), .WIDTH(8)) dut6 (.clk_in(clk), .din(din), .clk_out(co6), .q(q6), .dout(dout6));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The first latch closes on the rising edge: record what it captured,
  // then present the next datum while it is opaque.
  always @(posedge clk) begin
    cap.push_back(din);
    #1 din = 8'($urandom);
  end

  always @(negedge clk) begin
    int n;
    n = cap.size();
    checks++;
    if (co4 !== ~clk || co6 !== ~clk) begin
      failures++;
      $display("FAIL clk_out phase");
    end
    if (n >= 2) begin
      checks++;
      if (dout4 !== cap[n-2]) begin
        failures++;
        $display("FAIL S=4 n=%0d dout=%h exp=%h", n, dout4, cap[n-2]);
      end
    end
    if (n >= 3) begin
      checks++;
      if (dout6 !== cap[n-3]) begin
        failures++;
        $display("FAIL S=6 n=%0d dout=%h exp=%h", n, dout6, cap[n-3]);
      end
    end
    if (n == 300) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial din = 8'h5a;
endmodule
