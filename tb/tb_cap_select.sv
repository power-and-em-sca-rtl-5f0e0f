// tb_cap_select: scan control passes every enable pattern through; random
// mode gives exactly one capacitor, the one named by rnd when it is allowed
// (i7..i3 by default) and i7 otherwise.
module tb_cap_select;
  timeunit 1ps; timeprecision 1ps;
  logic       scan_ctrl;
  logic [7:0] cap_scan, cap_en, exp_o;
  logic [2:0] rnd;
  int checks = 0, failures = 0;
  cap_select dut (.scan_ctrl, .cap_scan, .rnd, .cap_en);
  initial begin
    #100000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    scan_ctrl = 1'b1;
    for (int v = 0; v < 256; v++) begin
      cap_scan = 8'(v); rnd = 3'(v);
      #1;
      checks++;
      if (cap_en !== cap_scan) begin failures++; $display("FAIL scan %h -> %h", cap_scan, cap_en); end
    end
    scan_ctrl = 1'b0;
    for (int v = 0; v < 8; v++) begin
      rnd = 3'(v); cap_scan = 8'hff;
      #1;
      exp_o = (v <= 4) ? 8'(1 << (7 - v)) : 8'h80;
      checks++;
      if (cap_en !== exp_o) begin failures++; $display("FAIL rnd %0d -> %b (exp %b)", v, cap_en, exp_o); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
