// tb_line_memory_block: a 5-deep and a 1-deep line memory block fed with
// random pixels.  After each rising edge, dout must equal the pixel written
// DEPTH edges earlier.  A second reset in mid-run must not break the delay.
`timescale 1ns/1ps
module tb_line_memory_block;
  int checks = 0, failures = 0;
  logic       clk = 1'b0, rst;
  logic [7:0] din, dout5, dout1;
  logic [7:0] hist [$];

  line_memory_block #(.WIDTH(8), .DEPTH(5)) dut5 (.clk(clk), .rst(rst), .din(din), .dout(dout5));
  line_memory_block #(.WIDTH(8), .DEPTH(1)) dut1 (.clk(clk), .rst(rst), .din(din), .dout(dout1));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    rst = 1'b1;
    din = 8'h00;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < 400; i++) begin
      din = 8'($urandom);
      @(posedge clk);
      hist.push_back(din);
      #1;
      n = hist.size();
      if (n > 5) begin
        checks++;
        if (dout5 !== hist[n-6]) begin
          failures++;
          $display("FAIL depth5 i=%0d dout=%h exp=%h", i, dout5, hist[n-6]);
        end
      end
      if (n > 1) begin
        checks++;
        if (dout1 !== hist[n-2]) begin
          failures++;
          $display("FAIL depth1 i=%0d dout=%h exp=%h", i, dout1, hist[n-2]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
