// tb_crsl_aes_top: end-to-end test of the whole chip at its default sizes.
// For each configuration -- unprotected (sharp external clock), SL with a
// scan-selected capacitor, SL with LFSR-selected capacitors, CR (randomized
// ring-oscillator clock, no capacitors) and CRSL (randomized clock with
// random capacitors) -- it scans in plaintexts on the 50 MHz external clock,
// starts the core, waits for done, shifts the ciphertext out serially and
// compares it with the reference AES-256 model (FIPS-197 example first).
// It also checks that trigger spans exactly 14 AES clocks, and counts how
// often each mechanism occurred: slew capacitors switched in, random
// capacitor picks (all five allowed capacitors), each ring-oscillator length, each divider setting, AES
// clocks from the external and from the generated source, trigger pulses and
// serial read-outs. A mechanism that never occurred counts as a failure.
module tb_crsl_aes_top;
  timeunit 1ps; timeprecision 1ps;
  import aes_ref_pkg::*;

  logic         clk_ext = 0, rst_n = 0;
  logic [3:0]   trng = 0;
  logic         scan_en = 0, scan_in = 0, scan_out;
  logic [255:0] key = '0;
  logic         start = 0, clk_sel = 0, ro_en = 0, scan_ctrl = 1, ct_shift = 0;
  logic [7:0]   cap_scan = 0;
  logic         trigger, done, ct_out, aes_clk;
  int checks = 0, failures = 0;

  crsl_aes_top dut (.*);

  always #10000 clk_ext = ~clk_ext;              // 50 MHz
  always @(posedge clk_ext) trng <= 4'($urandom);

  // ---- mechanism counters ----
  int n_slew_edges = 0, n_rand_cap = 0, n_ext_clk = 0, n_gen_clk = 0;
  int n_trigger = 0, n_readout = 0, trig_clocks = 0;
  int n_ro_len [8];
  int n_div [4];
  logic [7:0] cap_prev, caps_seen = '0;
  always @(posedge aes_clk) begin
    if (dut.cap_en != 0) n_slew_edges++;
    if (!scan_ctrl && dut.cap_en != cap_prev) n_rand_cap++;
    if (!scan_ctrl) caps_seen |= dut.cap_en;
    cap_prev = dut.cap_en;
    if (clk_sel) begin
      n_gen_clk++;
      n_div[dut.u_fgen.u_div.sel]++;
    end else n_ext_clk++;
  end
  always @(posedge dut.u_fgen.ro_clk) n_ro_len[dut.u_fgen.rnd[2:0]]++;
  always @(negedge aes_clk) if (trigger) trig_clocks++;
  always @(posedge trigger) n_trigger++;

  initial begin
    #4000000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic encrypt(logic [127:0] pt, logic [255:0] k);
    logic [127:0] got, exp_ct;
    int waited = 0;
    exp_ct = ref_encrypt(pt, k);
    key = k;
    for (int i = 127; i >= 0; i--) begin
      @(negedge clk_ext) scan_en = 1; scan_in = pt[i];
    end
    @(negedge clk_ext) scan_en = 0;
    trig_clocks = 0;
    @(negedge clk_ext) start = 1;
    wait (trigger);                       // held until the core has started
    @(negedge clk_ext) start = 0;
    while (!done && waited < 2000) begin @(negedge clk_ext); waited++; end
    for (int i = 127; i >= 0; i--) begin
      got[i] = ct_out;
      ct_shift = 1;
      @(negedge clk_ext);
    end
    ct_shift = 0;
    n_readout++;
    checks++;
    if (got !== exp_ct) begin failures++; $display("FAIL ct %h != %h (clk_sel=%0b caps=%b)", got, exp_ct, clk_sel, dut.cap_en); end
    checks++;
    if (trig_clocks != 14) begin failures++; $display("FAIL trigger spans %0d AES clocks", trig_clocks); end
  endtask

  task automatic run_mode(string name, int blocks);
    $display("mode %s", name);
    for (int n = 0; n < blocks; n++)
      encrypt({$urandom, $urandom, $urandom, $urandom},
              {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
  endtask

  initial begin
    repeat (3) @(negedge clk_ext);
    rst_n = 1;
    repeat (3) @(negedge clk_ext);
    // unprotected: sharp external clock
    clk_sel = 0; scan_ctrl = 1; cap_scan = 8'h00;
    encrypt(128'h00112233445566778899aabbccddeeff,
            256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f);
    checks++;
    if (dut.u_core.ciphertext !== 128'h8ea2b7ca516745bfeafc49904b496089) begin
      failures++; $display("FAIL FIPS-197 example");
    end
    run_mode("unprotected", 2);
    // SL-AES, capacitors set through scan control
    cap_scan = 8'h40; run_mode("SL 220 fF", 2);
    cap_scan = 8'h01; run_mode("SL 5 pF", 1);
    // SL-AES, random capacitor per AES clock
    scan_ctrl = 0; run_mode("SL random", 3);
    // CR-AES: randomized clock, no slew
    scan_ctrl = 1; cap_scan = 8'h00;
    ro_en = 1; repeat (4) @(negedge clk_ext);
    clk_sel = 1; run_mode("CR", 4);
    // CRSL-AES: randomized clock with random slew
    scan_ctrl = 0; run_mode("CRSL", 4);

    $display("slew edges %0d, random cap changes %0d, ext clocks %0d, generated clocks %0d, triggers %0d, readouts %0d",
             n_slew_edges, n_rand_cap, n_ext_clk, n_gen_clk, n_trigger, n_readout);
    checks++; if (n_slew_edges == 0) begin failures++; $display("FAIL no slewed clock"); end
    checks++; if (n_rand_cap < 10) begin failures++; $display("FAIL too few random capacitor changes"); end
    checks++; if (caps_seen != 8'hF8) begin failures++; $display("FAIL random picks covered %b, not i7..i3", caps_seen); end
    checks++; if (n_ext_clk == 0) begin failures++; $display("FAIL external clock never used"); end
    checks++; if (n_gen_clk == 0) begin failures++; $display("FAIL generated clock never used"); end
    checks++; if (n_trigger != 17) begin failures++; $display("FAIL trigger pulses %0d", n_trigger); end
    for (int i = 0; i < 8; i++) begin
      checks++; if (n_ro_len[i] == 0) begin failures++; $display("FAIL ring length %0d never used", i); end
    end
    for (int i = 0; i < 4; i++) begin
      $display("divider setting %0d: %0d AES clocks", i, n_div[i]);
      checks++; if (n_div[i] == 0) begin failures++; $display("FAIL divider setting %0d never used", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
