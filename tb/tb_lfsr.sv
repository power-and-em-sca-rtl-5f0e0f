// tb_lfsr: with the seed bit held at zero the register must follow the
// x^16+x^14+x^13+x^11+1 Galois recurrence (computed here bit by bit) and
// return to its start after 65535 clocks; with random seed bits it must follow
// the same recurrence with the bit XORed into the MSB and never reach zero.
module tb_lfsr;
  timeunit 1ps; timeprecision 1ps;
  logic clk = 0, rst_n = 0, seed_in = 0;
  logic [15:0] q, model, start_val;
  int checks = 0, failures = 0, period = 0;
  lfsr dut (.clk, .rst_n, .seed_in, .q);
  always #5 clk = ~clk;
  function automatic logic [15:0] step(logic [15:0] s, logic seed);
    logic out = s[0];
    logic [15:0] n;
    for (int i = 0; i < 15; i++) n[i] = s[i+1];
    n[15] = out ^ seed;
    n[12] = n[12] ^ out;   // x^13 term
    n[13] = n[13] ^ out;   // x^14 term
    n[10] = n[10] ^ out;   // x^11 term
    return n;
  endfunction
  initial begin
    #2000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++;
    if (q !== 16'hACE1) begin failures++; $display("FAIL reset value %h", q); end
    model = q; start_val = q;
    for (int i = 0; i < 65535; i++) begin
      model = step(model, 1'b0);
      @(negedge clk);
      if (i < 200) begin
        checks++;
        if (q !== model) begin failures++; $display("FAIL step %0d %h != %h", i, q, model); end
      end
      if (period == 0 && q == start_val) period = i + 1;
    end
    checks++;
    if (period != 65535) begin failures++; $display("FAIL period %0d", period); end
    for (int i = 0; i < 2000; i++) begin
      seed_in = 1'($urandom);
      model = step(q, seed_in);
      if (model == 0) model = 16'hACE1;
      @(negedge clk);
      checks++;
      if (q !== model || q == 0) begin failures++; $display("FAIL seeded step %h != %h", q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
