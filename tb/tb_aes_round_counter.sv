// tb_aes_round_counter: one start pulse must give busy for exactly 14 clocks
// with round = 0..13 in order, last_round only in round 13, then done held
// until the next start; a start while busy must be ignored.
module tb_aes_round_counter;
  timeunit 1ps; timeprecision 1ps;
  logic clk = 0, rst_n = 0, start = 0;
  logic [3:0] round;
  logic busy, last_round, done;
  int checks = 0, failures = 0;
  aes_round_counter dut (.clk, .rst_n, .start, .round, .busy, .last_round, .done);
  always #5 clk = ~clk;
  task automatic chk(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", msg, $time); end
  endtask
  initial begin
    #100000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!busy && !done, "idle after reset");
    for (int run = 0; run < 2; run++) begin
      start = 1;
      @(negedge clk) start = 0;
      for (int r = 0; r < 14; r++) begin
        chk(busy && !done, "busy during rounds");
        chk(round == 4'(r), "round index");
        chk(last_round == (r == 13), "last_round");
        if (r == 5) start = 1;     // must be ignored
        @(negedge clk);
        start = 0;
      end
      chk(!busy && done, "done after 14 rounds");
      repeat (3) @(negedge clk);
      chk(!busy && done, "done held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
