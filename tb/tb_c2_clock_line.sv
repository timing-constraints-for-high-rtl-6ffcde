// tb_c2_clock_line: checks the counterflow clock line.  For the inverting
// line, node k must equal the input clock inverted (NODES-1-k) times; for the
// buffer line every node equals the input.  clk_out must equal node 0.
`timescale 1ns/1ps
module tb_c2_clock_line;
  int checks = 0, failures = 0;
  localparam int N = 6;
  logic         clk;
  logic [N-1:0] node_i, node_b;
  logic         out_i, out_b;

  c2_clock_line #(.NODES(N), .INVERTING(1'b1)) dut_inv (.clk_in(clk), .node(node_i), .clk_out(out_i));
  c2_clock_line #(.NODES(N), .INVERTING(1'b0)) dut_buf (.clk_in(clk), .node(node_b), .clk_out(out_b));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk = 1'b0;
    for (int t = 0; t < 20; t++) begin
      clk = t[0];
      #1;
      for (int k = 0; k < N; k++) begin
        logic exp_i;
        exp_i = ((N - 1 - k) % 2 == 1) ? ~clk : clk;
        checks++;
        if (node_i[k] !== exp_i) begin
          failures++;
          $display("FAIL inverting node %0d = %b, clk %b", k, node_i[k], clk);
        end
        checks++;
        if (node_b[k] !== clk) begin
          failures++;
          $display("FAIL buffer node %0d = %b, clk %b", k, node_b[k], clk);
        end
      end
      checks++;
      if (out_i !== node_i[0] || out_b !== node_b[0]) begin
        failures++;
        $display("FAIL clk_out");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
