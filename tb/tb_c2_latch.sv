// tb_c2_latch: self-checking test of the level-sensitive C2 latch.
// Drives random data with the enable high (q must follow d at once) and low
// (q must keep the value it had when the enable fell).
`timescale 1ns/1ps
module tb_c2_latch;
  int checks = 0, failures = 0;
  logic       en;
  logic [7:0] d, q, held;

  c2_latch #(.WIDTH(8)) dut (.en(en), .d(d), .q(q));

  task automatic check(input logic [7:0] exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1'b1; d = 8'h00;
    #1;
    for (int i = 0; i < 200; i++) begin
      en = 1'b1;
      d  = 8'($urandom);
      #1 check(d, "transparent");
      d  = 8'($urandom);
      #1 check(d, "transparent follow");
      held = d;
      en = 1'b0;
      #1;
      repeat (3) begin
        d = 8'($urandom);
        #1 check(held, "opaque hold");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
