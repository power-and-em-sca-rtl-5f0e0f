// tb_aes_sub_bytes: checks SubBytes against the exhaustive-search reference
// S-box for all 256 byte values (each value placed in every byte position in
// turn) plus the FIPS-197 table entries S(00)=63, S(53)=ed, S(ff)=16.
module tb_aes_sub_bytes;
  timeunit 1ps; timeprecision 1ps;
  import aes_ref_pkg::*;
  logic [127:0] din, dout, exp_o;
  int checks = 0, failures = 0;
  aes_sub_bytes dut (.din, .dout);
  initial begin
    #100000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 256; v++) begin
      for (int i = 0; i < 16; i++) din[8*i +: 8] = byte'(v + 17*i);
      #1;
      exp_o = ref_sub_bytes(din);
      checks++;
      if (dout !== exp_o) begin failures++; $display("FAIL v=%0d %h != %h", v, dout, exp_o); end
    end
    din = {8'h00, 8'h53, 8'hff, 104'h0};
    #1;
    checks++;
    if (dout[127:104] !== 24'h63ed16) begin failures++; $display("FAIL FIPS entries %h", dout[127:104]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
