// slew_clk_buffer: BEHAVIOURAL MODEL (not synthesizable) of the slewed clock
// buffer. In silicon a clock buffer drives the AES clock net, and eight
// transmission gates (enables i7..i0, cap_en[7]..cap_en[0]) hang decoupling
// capacitors of 100 fF .. 5 pF on that net. The extra load makes the clock
// edge slow, which spreads the moment each flip-flop toggles and smears the
// power trace; the logic function of the clock is unchanged.
// A two-state simulator cannot show a slope, so the model shows its timing
// consequence: each edge reaches the switching threshold after
// T_BUF_PS + 0.69 * R_DRV_OHM * C_total, with rising edges RISE_NUM/RISE_DEN
// times slower than falling ones (a weaker pull-up), which distorts the duty
// cycle. The delays are inertial, as on a real net: a clock phase shorter
// than the delay is swallowed, which is how an oversized load keeps the
// clock from reaching its switching point. With delays ignored (synthesis)
// the model is a plain buffer.
// The 100/220/300 fF and 5 pF values follow the published circuit; the four
// middle capacitor values, the drive resistance and the rise/fall ratio are
// this model's assumptions.
module slew_clk_buffer #(
  parameter int unsigned CAP_I7_FF = 100,
  parameter int unsigned CAP_I6_FF = 220,
  parameter int unsigned CAP_I5_FF = 300,
  parameter int unsigned CAP_I4_FF = 450,
  parameter int unsigned CAP_I3_FF = 870,
  parameter int unsigned CAP_I2_FF = 1730,
  parameter int unsigned CAP_I1_FF = 3460,
  parameter int unsigned CAP_I0_FF = 5000,
  parameter int unsigned R_DRV_OHM = 200,
  parameter int unsigned T_BUF_PS  = 30,
  parameter int unsigned RISE_NUM  = 3,
  parameter int unsigned RISE_DEN  = 2
) (
  input  logic       clk_in,
  input  logic [7:0] cap_en,
  output wire        clk_out
);
  timeunit 1ps; timeprecision 1ps;

  int unsigned c_ff;      // total switched-in capacitance, fF
  int unsigned d_fall_ps; // input edge to output threshold crossing
  int unsigned d_rise_ps;

  always_comb begin
    c_ff = (cap_en[7] ? CAP_I7_FF : 0) + (cap_en[6] ? CAP_I6_FF : 0)
         + (cap_en[5] ? CAP_I5_FF : 0) + (cap_en[4] ? CAP_I4_FF : 0)
         + (cap_en[3] ? CAP_I3_FF : 0) + (cap_en[2] ? CAP_I2_FF : 0)
         + (cap_en[1] ? CAP_I1_FF : 0) + (cap_en[0] ? CAP_I0_FF : 0);
    // ohm * fF = 1e-3 ps; 0.69 * R * C in ps = 69 * R * C / 100000
    d_fall_ps = T_BUF_PS + (69 * R_DRV_OHM * c_ff) / 100000;
    d_rise_ps = T_BUF_PS + (69 * R_DRV_OHM * c_ff * RISE_NUM) / (100000 * RISE_DEN);
  end

  // Buffer with separate rise and fall delays.
  assign #(d_rise_ps, d_fall_ps) clk_out = clk_in;
endmodule
