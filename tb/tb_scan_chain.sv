// tb_scan_chain: scans random 128-bit words in MSB first and checks the
// parallel output, that nothing moves while scan_en is low, and scan_out.
module tb_scan_chain;
  timeunit 1ps; timeprecision 1ps;
  logic clk = 0, rst_n = 0, scan_en = 0, scan_in = 0, scan_out;
  logic [127:0] q, word, prev;
  int checks = 0, failures = 0;
  scan_chain dut (.clk, .rst_n, .scan_en, .scan_in, .scan_out, .q);
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
      for (int i = 127; i >= 0; i--) begin
        scan_en = 1; scan_in = word[i];
        @(negedge clk);
      end
      scan_en = 0; scan_in = $urandom;
      checks++;
      if (q !== word) begin failures++; $display("FAIL q %h != %h", q, word); end
      checks++;
      if (scan_out !== word[127]) begin failures++; $display("FAIL scan_out"); end
      prev = q;
      repeat (5) @(negedge clk);
      checks++;
      if (q !== prev) begin failures++; $display("FAIL moved while scan_en low"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
