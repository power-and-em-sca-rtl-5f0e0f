// tb_tunable_ro: for each of the 8 length settings measures the oscillation
// period, which must be 2*(1 + 2*(40 + 8*sel))*20 ps; checks that the output
// is quiet at 0 while disabled and restarts when enabled again.
module tb_tunable_ro;
  timeunit 1ps; timeprecision 1ps;
  logic en = 0, ro_out;
  logic [2:0] sel = 0;
  int checks = 0, failures = 0, edges = 0;
  tunable_ro dut (.en, .sel, .ro_out);
  always @(ro_out) edges++;
  initial begin
    #10000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    time t1, t2;
    longint exp_p;
    #10000;
    edges = 0;
    #5000;
    checks++;
    if (edges != 0 || ro_out !== 1'b0) begin failures++; $display("FAIL toggles while disabled"); end
    for (int s = 0; s < 8; s++) begin
      sel = 3'(s);
      en = 1;
      repeat (2) @(posedge ro_out);
      t1 = $time;
      @(posedge ro_out);
      t2 = $time;
      exp_p = 2 * (1 + 2 * (40 + 8 * s)) * 20;
      checks++;
      if (longint'(t2 - t1) != exp_p) begin failures++; $display("FAIL sel=%0d period %0t exp %0d", s, t2 - t1, exp_p); end
      en = 0;
      #20000;
      edges = 0;
      #20000;
      checks++;
      if (edges != 0 || ro_out !== 1'b0) begin failures++; $display("FAIL not stopped sel=%0d", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
