// tb_load_sweep: the operating points used to characterise the clock-load
// overhead: AES clock frequencies of 10, 20, 30, 40 and 50 MHz, each with the
// single loads 220 fF, 870 fF, 1.73 pF and 3.46 pF on the AES clock (external
// clock, capacitors set through scan control), plus no load for reference.
// At every point it encrypts two random blocks and checks the serial
// ciphertext against the reference model. It measures the AES clock's high
// time and its delay behind the source clock and checks that both follow the
// load: the delay grows and the high time shrinks monotonically with the
// capacitance, at every frequency, and the clock is never lost.
module tb_load_sweep;
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
  int unsigned half_ps = 50000;

  crsl_aes_top dut (.*);

  always #(half_ps) clk_ext = ~clk_ext;
  always @(posedge clk_ext) trng <= 4'($urandom);

  time t_src_rise, t_rise, high_ps, delay_ps;
  always @(posedge clk_ext) t_src_rise = $time;
  always @(posedge aes_clk) begin
    t_rise   = $time;
    delay_ps = $time - t_src_rise;
  end
  always @(negedge aes_clk) high_ps = $time - t_rise;

  initial begin
    #2000000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic encrypt();
    logic [127:0] pt, got, exp_ct;
    pt  = {$urandom, $urandom, $urandom, $urandom};
    key = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    exp_ct = ref_encrypt(pt, key);
    for (int i = 127; i >= 0; i--) begin
      @(negedge clk_ext) scan_en = 1; scan_in = pt[i];
    end
    @(negedge clk_ext) scan_en = 0;
    start = 1;
    wait (trigger);
    @(negedge clk_ext) start = 0;
    wait (done);
    @(negedge clk_ext);
    for (int i = 127; i >= 0; i--) begin
      got[i] = ct_out;
      ct_shift = 1;
      @(negedge clk_ext);
    end
    ct_shift = 0;
    checks++;
    if (got !== exp_ct) begin failures++; $display("FAIL ct %h != %h", got, exp_ct); end
  endtask

  initial begin
    logic [7:0] loads [5] = '{8'h00, 8'h40, 8'h08, 8'h04, 8'h02};  // 0, 220 fF, 870 fF, 1.73 pF, 3.46 pF
    time prev_delay, prev_high;
    repeat (3) @(negedge clk_ext);
    rst_n = 1;
    for (int f = 10; f <= 50; f += 10) begin
      half_ps = 500000 / f;            // period 1e6/f ps
      for (int l = 0; l < 5; l++) begin
        cap_scan = loads[l];
        repeat (4) @(negedge clk_ext);
        encrypt();
        encrypt();
        $display("%0d MHz, load %b: AES clock delay %0t ps, high time %0t ps of %0d", f, loads[l], delay_ps, high_ps, half_ps);
        checks++;
        if (high_ps == 0 || high_ps > time'(half_ps)) begin failures++; $display("FAIL clock phase"); end
        if (l > 0) begin
          checks++;
          if (!(delay_ps > prev_delay && high_ps < prev_high)) begin
            failures++; $display("FAIL delay/high time not monotonic in load");
          end
        end
        prev_delay = delay_ps;
        prev_high  = high_ps;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
