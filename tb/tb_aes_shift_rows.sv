// tb_aes_shift_rows: ShiftRows on a state whose bytes are their own indices
// (the FIPS-197 row rotation pattern must appear) and on random states
// against the reference permutation.
module tb_aes_shift_rows;
  timeunit 1ps; timeprecision 1ps;
  import aes_ref_pkg::*;
  logic [127:0] din, dout;
  int checks = 0, failures = 0;
  aes_shift_rows dut (.din, .dout);
  initial begin
    #100000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    din = 128'h000102030405060708090a0b0c0d0e0f;
    #1;
    checks++;
    if (dout !== 128'h00050a0f04090e03080d02070c01060b) begin failures++; $display("FAIL index pattern %h", dout); end
    for (int n = 0; n < 200; n++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      #1;
      checks++;
      if (dout !== ref_shift_rows(din)) begin failures++; $display("FAIL %h -> %h", din, dout); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
