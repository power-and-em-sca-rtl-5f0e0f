// tb_freq_generator: runs the randomized clock source for each divider choice
// and collects the lengths of its periods. Every ring-oscillator period must
// be the sum of two nominal half periods (81+16k)*20 ps (k = 0..7), since
// the length may change between the two halves; several different lengths must appear (fine randomization) and
// the mean must scale with the division (coarse randomization). The output
// must stay low while the oscillator is disabled.
module tb_freq_generator;
  timeunit 1ps; timeprecision 1ps;
  logic rst_n = 0, ro_en = 0, clk_out;
  logic [2:0] trng = 0;
  int checks = 0, failures = 0, edges = 0;
  freq_generator dut (.rst_n, .ro_en, .trng, .clk_out);
  always @(posedge clk_out) edges++;
  initial begin
    #100000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    time t_prev, t_now, p;
    bit seen [15];
    int n_seen;
    real mean [4];
    #1000;
    checks++;
    if (edges != 0) begin failures++; $display("FAIL clock while disabled"); end
    rst_n = 1;
    ro_en = 1;
    // undivided: every period is one RO period
    for (int d = 0; d < 4; d++) begin
      trng[2:1] = 2'(d);
      repeat (4) @(posedge clk_out);
      @(posedge clk_out) t_prev = $time;
      mean[d] = 0.0;
      foreach (seen[k]) seen[k] = 0;
      for (int i = 0; i < 200; i++) begin
        trng[0] = 1'($urandom);
        @(posedge clk_out) t_now = $time;
        p = t_now - t_prev;
        t_prev = t_now;
        mean[d] += $itor(p) / 200.0;
        if (d == 0) begin
          int k;
          k = (int'(p) / 20 - 162) / 16;
          checks++;
          if (k < 0 || k > 14 || int'(p) != (162 + 16 * k) * 20) begin
            failures++; $display("FAIL period %0t not a ring length", p);
          end else seen[k] = 1;
        end
      end
      if (d == 0) begin
        n_seen = 0;
        foreach (seen[k]) n_seen += int'(seen[k]);
        checks++;
        if (n_seen < 4) begin failures++; $display("FAIL only %0d ring lengths used", n_seen); end
      end
    end
    for (int d = 1; d < 4; d++) begin
      checks++;
      if (mean[d] < 1.5 * mean[d-1] || mean[d] > 2.5 * mean[d-1]) begin
        failures++; $display("FAIL mean period %f vs %f", mean[d], mean[d-1]);
      end
    end
    ro_en = 0;
    #20000;
    edges = 0;
    #50000;
    checks++;
    if (edges != 0) begin failures++; $display("FAIL clock after disable"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
