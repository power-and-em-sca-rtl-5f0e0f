// tb_aes256_key_expand: loads a key, then steps through the 15 round keys in
// the order the core uses them (upper half, lower half + advance, ...) and
// compares each with the reference schedule. Keys: the FIPS-197 AES-256 key
// (whose w[8] = 9ba35411 and w[59] = 706c631e are also checked) and random keys.
module tb_aes256_key_expand;
  timeunit 1ps; timeprecision 1ps;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, advance = 0, sel_low = 0;
  logic [255:0] key;
  logic [127:0] round_key;
  rk_t rk;
  int checks = 0, failures = 0;
  aes256_key_expand dut (.clk, .rst_n, .load, .key, .advance, .sel_low, .round_key);
  always #5 clk = ~clk;
  initial begin
    #1000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic run_key(logic [255:0] k);
    rk = ref_key_schedule(k);
    key = k;
    @(negedge clk) load = 1;
    @(negedge clk) load = 0;
    for (int r = 0; r < 15; r++) begin
      sel_low = r[0];
      advance = r[0];
      #1;
      checks++;
      if (round_key !== rk[r]) begin failures++; $display("FAIL r=%0d %h != %h", r, round_key, rk[r]); end
      @(negedge clk);
    end
    advance = 0; sel_low = 0;
  endtask
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    rk = ref_key_schedule(256'h603deb1015ca71be2b73aef0857d77811f352c073b6108d72d9810a30914dff4);
    checks++;
    if (rk[2][127:96] !== 32'h9ba35411 || rk[14][31:0] !== 32'h706c631e) begin
      failures++; $display("FAIL reference schedule");
    end
    run_key(256'h603deb1015ca71be2b73aef0857d77811f352c073b6108d72d9810a30914dff4);
    for (int n = 0; n < 10; n++)
      run_key({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
