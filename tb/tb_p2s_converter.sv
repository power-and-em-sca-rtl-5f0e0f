// tb_p2s_converter: loads random words and collects 128 serial bits, which
// must equal the word MSB first; dout must hold while shift is low.
module tb_p2s_converter;
  timeunit 1ps; timeprecision 1ps;
  logic clk = 0, rst_n = 0, load = 0, shift = 0, dout;
  logic [127:0] din, got, word;
  int checks = 0, failures = 0;
  p2s_converter dut (.clk, .rst_n, .load, .shift, .din, .dout);
  always #5 clk = ~clk;
  initial begin
    #1000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 8; n++) begin
      word = {$urandom, $urandom, $urandom, $urandom};
      din = word;
      load = 1;
      @(negedge clk) load = 0;
      din = '0;
      repeat (3) @(negedge clk);
      for (int i = 127; i >= 0; i--) begin
        got[i] = dout;
        shift = 1;
        @(negedge clk);
        shift = 0;
        if (i % 32 == 0) @(negedge clk);
      end
      checks++;
      if (got !== word) begin failures++; $display("FAIL serial %h != %h", got, word); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
