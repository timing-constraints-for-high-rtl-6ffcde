// tb_c2_sync_interface: random data through the synchronization interface
// (4-latch pipeline).  The input latch is open while clk is high, so the test
// changes din just after each falling edge and the interface takes it at the
// next falling edge.  At the rising edges, when a receiver on clk would
// take it, dout must hold the datum taken two falling edges earlier.
`timescale 1ns/1ps
module tb_c2_sync_interface;
  int checks = 0, failures = 0;
  logic       clk = 1'b0;
  logic [7:0] din, dout;
  logic [7:0] cap [$];

  c2_sync_interface #(.STAGES(4), .WIDTH(8)) dut (.clk(clk), .din(din), .dout(dout));

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
    #1;
    n = cap.size();
    if (n >= 2) begin
      checks++;
      if (dout !== cap[n-2]) begin
        failures++;
        $display("FAIL n=%0d dout=%h exp=%h", n, dout, cap[n-2]);
      end
    end
    if (n == 300) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial din = 8'h11;
endmodule
