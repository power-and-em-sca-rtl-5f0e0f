// crsl_aes_top: AES-256 with a clock-slew and clock-randomization
// countermeasure against power and electromagnetic side-channel analysis.
//
// Datapath: the plaintext is scanned into a 128-bit scan chain, the
// iterative AES-256 core encrypts it (14 round clocks), and the ciphertext is
// shifted out of a parallel-to-serial converter on ct_out.
// Clocking: the AES clock comes either from the external clock or from the
// frequency generator (tunable ring oscillator with LFSR-chosen length, then
// TRNG-chosen divide by 1/2/4/8). Either passes through the slewed clock
// buffer, whose capacitor bank (i7..i0) is set by scan control or picked at
// random by a second LFSR clocked by the AES clock. The four measured
// configurations map to: unprotected (clk_sel=0, scan_ctrl=1, cap_scan=0),
// SL (clk_sel=0, capacitors on), CR (clk_sel=1, ro_en=1, no capacitors) and
// CRSL (clk_sel=1, ro_en=1, capacitors on).
// Clock domains: scan chain, converter and handshake run on clk_ext; the core
// runs on aes_clk. start is synchronised into aes_clk (two flip-flops plus
// rising-edge detect). Completion is signalled back by a toggle that is
// synchronised into clk_ext; it loads the ciphertext into the converter and
// sets done, which start clears. After done rises, each clk_ext clock with
// ct_shift high presents the next ciphertext bit (MSB first on ct_out).
// start must be held until trigger rises. The plaintext
// and key must be held stable from start until done. clk_sel, ro_en and the
// divider choice should change only while the core is idle.
// trigger (aes_clk domain) is high during the round clocks, for aligning
// measured traces. TRNG bits: [0] ring-oscillator LFSR, [1] capacitor LFSR,
// [3:2] divider choice.
// Block structure follows the published architecture; the clock-domain
// handling, configuration pins and key port are this design's choices.
module crsl_aes_top (
  input  logic         clk_ext,
  input  logic         rst_n,
  input  logic [3:0]   trng,
  input  logic         scan_en,
  input  logic         scan_in,
  output logic         scan_out,
  input  logic [255:0] key,
  input  logic         start,
  input  logic         clk_sel,
  input  logic         ro_en,
  input  logic         scan_ctrl,
  input  logic [7:0]   cap_scan,
  input  logic         ct_shift,
  output logic         trigger,
  output logic         done,
  output logic         ct_out,
  output logic         aes_clk
);
  timeunit 1ps; timeprecision 1ps;

  // ---------------- clock generation ----------------
  logic       fg_clk, src_clk;
  logic [15:0] cap_rnd;
  logic [7:0] cap_en;

  freq_generator u_fgen (
    .rst_n, .ro_en, .trng({trng[3:2], trng[0]}), .clk_out(fg_clk)
  );

  assign src_clk = clk_sel ? fg_clk : clk_ext;

  lfsr u_cap_lfsr (.clk(aes_clk), .rst_n, .seed_in(trng[1]), .q(cap_rnd));

  cap_select u_cap_sel (.scan_ctrl, .cap_scan, .rnd(cap_rnd[2:0]), .cap_en);

  slew_clk_buffer u_slew (.clk_in(src_clk), .cap_en, .clk_out(aes_clk));

  // ---------------- plaintext in ----------------
  logic [127:0] plaintext, ciphertext;

  scan_chain #(.WIDTH(128)) u_scan (
    .clk(clk_ext), .rst_n, .scan_en, .scan_in, .scan_out, .q(plaintext)
  );

  // ---------------- start into the AES clock domain ----------------
  logic start_s, start_s_d, core_start;
  sync_2ff u_sync_start (.clk(aes_clk), .rst_n, .d(start), .q(start_s));
  always_ff @(posedge aes_clk or negedge rst_n)
    if (!rst_n) start_s_d <= 1'b0; else start_s_d <= start_s;
  assign core_start = start_s && !start_s_d;

  // ---------------- AES core ----------------
  logic core_done;
  aes256_core u_core (
    .clk(aes_clk), .rst_n, .start(core_start), .plaintext, .key,
    .ciphertext, .busy(), .done(core_done), .trigger
  );

  // ---------------- ciphertext out ----------------
  // Each completed encryption flips done_tgl in the AES clock domain; the
  // flip is carried into clk_ext by a two-flip-flop synchronizer, so even a
  // very short gap between two encryptions on a fast clock is not lost.
  logic core_done_d, done_tgl, done_tgl_s, done_tgl_s_d, ct_ready;
  always_ff @(posedge aes_clk or negedge rst_n) begin
    if (!rst_n) begin
      core_done_d <= 1'b0;
      done_tgl    <= 1'b0;
    end else begin
      core_done_d <= core_done;
      if (core_done && !core_done_d) done_tgl <= ~done_tgl;
    end
  end

  sync_2ff u_sync_done (.clk(clk_ext), .rst_n, .d(done_tgl), .q(done_tgl_s));
  assign ct_ready = done_tgl_s ^ done_tgl_s_d;

  always_ff @(posedge clk_ext or negedge rst_n) begin
    if (!rst_n) begin
      done_tgl_s_d <= 1'b0;
      done         <= 1'b0;
    end else begin
      done_tgl_s_d <= done_tgl_s;
      if (ct_ready)   done <= 1'b1;
      else if (start) done <= 1'b0;
    end
  end

  p2s_converter #(.WIDTH(128)) u_p2s (
    .clk(clk_ext), .rst_n, .load(ct_ready), .shift(ct_shift),
    .din(ciphertext), .dout(ct_out)
  );
endmodule
