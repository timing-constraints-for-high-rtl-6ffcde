// tb_line_memory_unit: a line memory unit with 7-pixel lines.  The test acts
// as the input latch on the unit's outgoing clock: it changes din just after
// each rising edge of clk and holds it through the low phase.  Just after the
// next rising edge the output latch is closed.  Then tap 0 must be the last
// pixel and tap j the pixel 7*j pixels older.  The test also checks that tap
// 1 and tap 3, which take the split forwarding path, line up with the rest.
`timescale 1ns/1ps
module tb_line_memory_unit;
  import c2_pkg::*;
  localparam int L = 7;
  int checks = 0, failures = 0;
  logic   clk = 1'b0, rst, clk_out;
  pixel_t din;
  pixel_t taps [LMU_TAPS];
  pixel_t hist [$];

  line_memory_unit #(.WIDTH(PIXEL_W), .LINE_LEN(L)) dut (
    .clk_in(clk), .rst(rst), .din(din), .clk_out(clk_out), .taps(taps));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    rst = 1'b1;
    din = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < 500; i++) begin
      din = pixel_t'($urandom);
      hist.push_back(din);
      @(posedge clk);
      #1;
      n = hist.size();
      checks++;
      if (clk_out !== clk) begin
        failures++;
        $display("FAIL clk_out phase");
      end
      for (int j = 0; j < LMU_TAPS; j++) begin
        if (n - 1 - j * L >= 0) begin
          checks++;
          if (taps[j] !== hist[n-1-j*L]) begin
            failures++;
            $display("FAIL i=%0d tap%0d=%h exp=%h", i, j, taps[j], hist[n-1-j*L]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
