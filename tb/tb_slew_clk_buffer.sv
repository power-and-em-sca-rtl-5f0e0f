// tb_slew_clk_buffer: drives a 20 ns clock through the buffer model for a set
// of capacitor enables and measures, for each, the delay of the rising and of
// the falling output edge. Expected delays are 30 ps + 0.69*R*C (rising edges
// 1.5x slower), with C summed from 100/220/300/450/870/1730/3460/5000 fF and
// R = 200 ohm, within 1 ps. Also checks that the output high time shrinks,
// i.e. the duty cycle is distorted, once capacitors are on.
module tb_slew_clk_buffer;
  timeunit 1ps; timeprecision 1ps;
  logic clk_in = 0, clk_out;
  logic [7:0] cap_en = 0;
  int checks = 0, failures = 0;
  real caps [8] = '{5000.0, 3460.0, 1730.0, 870.0, 450.0, 300.0, 220.0, 100.0}; // i0..i7
  slew_clk_buffer dut (.clk_in, .cap_en, .clk_out);
  initial begin
    #10000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic measure(logic [7:0] en);
    real c = 0.0, exp_f, exp_r;
    time t0, tr, tf;
    for (int i = 0; i < 8; i++) if (en[i]) c += caps[i];
    exp_f = 30.0 + 0.69 * 200.0 * c * 1.0e-3;
    exp_r = 30.0 + 1.5 * 0.69 * 200.0 * c * 1.0e-3;
    cap_en = en;
    #20000;
    clk_in = 1; t0 = $time;
    @(posedge clk_out) tr = $time - t0;
    #(10000 - tr);
    clk_in = 0; t0 = $time;
    @(negedge clk_out) tf = $time - t0;
    #(10000 - tf);
    checks++;
    if ($itor(tr) < exp_r - 1.0 || $itor(tr) > exp_r + 1.0) begin
      failures++; $display("FAIL en=%b rise %0t exp %f", en, tr, exp_r);
    end
    checks++;
    if ($itor(tf) < exp_f - 1.0 || $itor(tf) > exp_f + 1.0) begin
      failures++; $display("FAIL en=%b fall %0t exp %f", en, tf, exp_f);
    end
    if (en != 0) begin
      checks++;
      if (!(tr > tf)) begin failures++; $display("FAIL no duty-cycle distortion en=%b", en); end
    end
  endtask
  initial begin
    measure(8'h00);
    measure(8'h80);
    measure(8'h40);
    measure(8'h20);
    measure(8'h01);
    measure(8'h18);
    measure(8'hff);
    for (int n = 0; n < 10; n++) measure(8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
