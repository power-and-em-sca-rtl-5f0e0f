// tunable_ro: BEHAVIOURAL MODEL (not synthesizable) of the tunable ring
// oscillator used for fine clock-frequency randomization.
// In silicon a NAND gate (enable input) closes a loop through a chain of
// inverters; a multiplexer driven by an LFSR picks the tap that closes the
// loop, so the number of stages, and with it the period, changes at random.
// A ring is a combinational loop, so it is modelled with delays: while en is
// high the output toggles every (1 + 2*(BASE_PAIRS + sel*STEP_PAIRS)) stage
// delays, i.e. the NAND plus an even number of inverters; while en is low the
// output rests at zero. The tap is sampled at every toggle. The inertial
// delay also means the output falls half a period after en falls. Stage delay and
// stage counts are this model's assumptions. Supply tuning of the ring is
// not modelled.
module tunable_ro #(
  parameter int unsigned SEL_W      = 3,
  parameter int unsigned T_STAGE_PS = 20,
  parameter int unsigned BASE_PAIRS = 40,
  parameter int unsigned STEP_PAIRS = 8
) (
  input  logic             en,
  input  logic [SEL_W-1:0] sel,
  output logic             ro_out
);
  timeunit 1ps; timeprecision 1ps;

  int unsigned half_ps;
  always_comb half_ps = (1 + 2 * (BASE_PAIRS + int'(sel) * STEP_PAIRS)) * T_STAGE_PS;

  // The loop: the output is the enabled inversion of itself, half a period
  // later. It stays a combinational loop when delays are ignored (synthesis),
  // as a ring oscillator must; this model is for simulation only.
  assign #(half_ps) ro_out = en & ~ro_out;
endmodule
