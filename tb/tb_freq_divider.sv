// tb_freq_divider: with a 1 ns input clock counts output rising edges over
// 800 input clocks for each sel; expects 800, 400, 200 and 100.
module tb_freq_divider;
  timeunit 1ps; timeprecision 1ps;
  logic clk_in = 0, rst_n = 0, clk_out;
  logic [1:0] sel = 0;
  int checks = 0, failures = 0, n_out = 0;
  freq_divider dut (.clk_in, .rst_n, .sel, .clk_out);
  always #500 clk_in = ~clk_in;
  always @(posedge clk_out) n_out++;
  initial begin
    #100000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    #2200;
    rst_n = 1;
    for (int s = 0; s < 4; s++) begin
      sel = 2'(s);
      repeat (16) @(negedge clk_in);
      n_out = 0;
      repeat (800) @(negedge clk_in);
      checks++;
      if (n_out != (800 >> s)) begin failures++; $display("FAIL sel=%0d edges %0d", s, n_out); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
