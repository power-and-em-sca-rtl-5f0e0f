// tb_aes_mix_columns: MixColumns on the known column db135345 -> 8e4da1bc
// (and f20a225c -> 9fdc589d) and on random states against the reference.
module tb_aes_mix_columns;
  timeunit 1ps; timeprecision 1ps;
  import aes_ref_pkg::*;
  logic [127:0] din, dout;
  int checks = 0, failures = 0;
  aes_mix_columns dut (.din, .dout);
  initial begin
    #100000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    din = 128'hdb135345_f20a225c_01010101_c6c6c6c6;
    #1;
    checks++;
    if (dout !== 128'h8e4da1bc_9fdc589d_01010101_c6c6c6c6) begin failures++; $display("FAIL known %h", dout); end
    for (int n = 0; n < 200; n++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      #1;
      checks++;
      if (dout !== ref_mix_columns(din)) begin failures++; $display("FAIL %h -> %h", din, dout); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
