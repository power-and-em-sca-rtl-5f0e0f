// tb_aes_add_round_key: random state/key pairs; the output must equal the
// XOR, and XORing the key again must restore the state.
module tb_aes_add_round_key;
  timeunit 1ps; timeprecision 1ps;
  logic [127:0] state, round_key, dout;
  int checks = 0, failures = 0;
  aes_add_round_key dut (.state, .round_key, .dout);
  initial begin
    #100000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int n = 0; n < 200; n++) begin
      state     = {$urandom, $urandom, $urandom, $urandom};
      round_key = {$urandom, $urandom, $urandom, $urandom};
      #1;
      for (int b = 0; b < 128; b++) begin
        checks++;
        if (dout[b] !== (state[b] != round_key[b])) begin failures++; $display("FAIL bit %0d", b); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
