// tb_aes256_core: encrypts the FIPS-197 AES-256 example, four NIST SP 800-38A
// ECB-AES256 blocks and random blocks; compares with the known answers and
// the reference model. Checks that done rises exactly 15 clocks after the
// start edge, that trigger is high for the 14 round clocks, and that the
// state register holds round-13 / round-14 values around the last round.
module tb_aes256_core;
  timeunit 1ps; timeprecision 1ps;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [127:0] plaintext, ciphertext;
  logic [255:0] key;
  logic busy, done, trigger;
  int checks = 0, failures = 0;
  aes256_core dut (.clk, .rst_n, .start, .plaintext, .key, .ciphertext, .busy, .done, .trigger);
  always #5 clk = ~clk;
  initial begin
    #10000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic enc(logic [127:0] pt, logic [255:0] k, logic [127:0] exp_ct);
    int cycles = 0, trig = 0;
    plaintext = pt; key = k;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cycles = 1;
    while (!done) begin
      if (trigger) trig++;
      if (dut.last_round) begin
        // register holds round 13 without its key; it is attacked from here
        checks++;
        if (dut.state_q !== (ref_state_after(pt, k, 13) ^ ref_key_schedule(k)[13])) begin
          failures++; $display("FAIL round-13 state %h", dut.state_q);
        end
      end
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (ciphertext !== exp_ct) begin failures++; $display("FAIL ct %h != %h", ciphertext, exp_ct); end
    checks++;
    if (dut.state_q !== (exp_ct ^ ref_key_schedule(k)[14])) begin failures++; $display("FAIL round-14 state"); end
    checks++;
    if (cycles != 15) begin failures++; $display("FAIL latency %0d", cycles); end
    checks++;
    if (trig != 14) begin failures++; $display("FAIL trigger cycles %0d", trig); end
  endtask
  logic [255:0] k2;
  logic [127:0] p;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    enc(128'h00112233445566778899aabbccddeeff,
        256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f,
        128'h8ea2b7ca516745bfeafc49904b496089);
    k2 = 256'h603deb1015ca71be2b73aef0857d77811f352c073b6108d72d9810a30914dff4;
    enc(128'h6bc1bee22e409f96e93d7e117393172a, k2, 128'hf3eed1bdb5d2a03c064b5a7e3db181f8);
    enc(128'hae2d8a571e03ac9c9eb76fac45af8e51, k2, 128'h591ccb10d410ed26dc5ba74a31362870);
    enc(128'h30c81c46a35ce411e5fbc1191a0a52ef, k2, 128'hb6ed21b99ca6f4f9f153e7b1beafed1d);
    enc(128'hf69f2445df4f9b17ad2b417be66c3710, k2, 128'h23304b7a39f9f3ff067d8d8f9e24ecc7);
    for (int n = 0; n < 20; n++) begin
      p  = {$urandom, $urandom, $urandom, $urandom};
      k2 = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      enc(p, k2, ref_encrypt(p, k2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
