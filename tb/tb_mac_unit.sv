// tb_mac_unit: random multiply-accumulate runs of random length.  Operands
// change just after each rising edge and are taken at the next one.  One
// clock later the accumulator must show the running sum, computed here with
// plain arithmetic and starting again at every clear.  The test checks the
// falling edge after the result's rising edge, so it also checks the
// one-result-per-cycle rate and the one-cycle latency.
`timescale 1ns/1ps
module tb_mac_unit;
  int checks = 0, failures = 0, clears = 0, accums = 0;
  logic        clk = 1'b0, clr;
  logic [7:0]  a, b;
  logic [23:0] acc;
  logic [23:0] expq [$];
  logic [23:0] ref_sum;

  mac_unit #(.A_W(8), .B_W(8), .ACC_W(24)) dut (.clk(clk), .clr(clr), .a(a), .b(b), .acc(acc));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Operands taken at the rising edge: update the reference sum.
  always @(posedge clk) begin
    if (clr) begin
      ref_sum = 24'(a * b);
      clears++;
    end else begin
      ref_sum = ref_sum + 24'(a * b);
      accums++;
    end
    expq.push_back(ref_sum);
    #1;
    clr = ($urandom_range(0, 9) == 0);
    a = 8'($urandom);
    b = 8'($urandom);
  end

  always @(negedge clk) begin
    int n;
    n = expq.size();
    if (n >= 2) begin
      checks++;
      if (acc !== expq[n-2]) begin
        failures++;
        $display("FAIL n=%0d acc=%h exp=%h", n, acc, expq[n-2]);
      end
    end
    if (n == 400) begin
      if (clears == 0 || accums == 0) failures++;
      $display("clears=%0d accumulations=%0d", clears, accums);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    clr = 1'b1; a = 8'd3; b = 8'd4; ref_sum = '0;
  end
endmodule
