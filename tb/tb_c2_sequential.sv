// tb_c2_sequential: two 4-latch C2 pipelines in sequence act as one 8-latch
// pipeline.  The first latch (clock clk_out = ~clk) closes at each rising
// edge of clk.  At the following falling edges dout must equal the datum
// captured four rising edges earlier, (8-2) half periods of latch delay.
`timescale 1ns/1ps
module tb_c2_sequential;
  int checks = 0, failures = 0;
  logic       clk = 1'b0, clk_out;
  logic [7:0] din, dout;
  logic [7:0] cap [$];

  c2_sequential #(.STAGES_A(4), .STAGES_B(4), .WIDTH(8)) dut (
    .clk(clk), .din(din), .clk_out(clk_out), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cap.push_back(din);
    #1 din = 8'($urandom);
  end

  always @(negedge clk) begin
    int n;
    n = cap.size();
    checks++;
    if (clk_out !== ~clk) begin
      failures++;
      $display("FAIL clk_out phase");
    end
    if (n >= 4) begin
      checks++;
      if (dout !== cap[n-4]) begin
        failures++;
        $display("FAIL n=%0d dout=%h exp=%h", n, dout, cap[n-4]);
      end
    end
    if (n == 300) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial din = 8'h22;
endmodule
