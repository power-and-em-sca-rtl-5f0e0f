# AES-256 with a slewed, randomized clock

This is an AES-256 encryption core protected against power and
electromagnetic side-channel attacks from the clock side rather than the supply side.
The idea is to stop giving the flip-flops a sharp clock edge. A switchable capacitor
bank on the clock net makes the edge slow. How fast a flip-flop's internal clock
buffers and latches respond then depends on the slew, on the data, on where the
flip-flop sits in the clock tree and on device mismatch. As a result the current
drawn at each clock edge is smeared in time, and its shape is no longer a clean
function of the processed data. On top of that, the clock frequency is randomized
by a ring oscillator of random length followed by a random frequency divider.
With sharp edges, an attacker can undo frequency randomization by realigning
traces or band-pass filtering them. With slow edges the clock edges cannot be
located in the trace, so that no longer works. The countermeasure adds no logic
to the cipher itself. It only touches the clock, and apart from the oscillator
and the capacitors it is ordinary synthesizable logic.

The measured silicon this design follows was a 65 nm chip. Its reported
figures, which this RTL cannot reproduce (they are analog and measurement
results), show the combination's strength:

| configuration | CPA attack: traces to disclose the key |
|---|---|
| unprotected | about 11 K |
| slewed clock only (SL) | about 1.2 M |
| randomized clock only (CR) | about 70 K with band-pass filtering |
| randomized and slewed (CRSL) | not disclosed with 20 M |

The reported costs were under 5 % extra power and about 11 % extra area. Loads
above 870 fF were avoided so that the maximum clock frequency was not reduced.

## Structure

```
                    +------------------- frequency generator ------------------+
 trng[0] --> LFSR --+--> tunable ring oscillator --> 3 T-FF divider + 4:1 mux --+--> fg_clk
                    |     (8 lengths)          ro_clk  (/1 /2 /4 /8, trng[3:2])  |
                    +-----------------------------------------------------------+
 clk_ext ----------------------------------------+            fg_clk
                                   clk_sel -->[ mux ]--> src_clk
                                                   |
                      cap_en[7:0] (i7..i0) --> slewed clock buffer --> aes_clk
                           ^                       (capacitor bank, 100 fF .. 5 pF)
                cap_select: scan_ctrl ? cap_scan : one-hot(LFSR on aes_clk, seeded by trng[1])

 scan_in --> 128-bit scan chain --plaintext--> +---------------------+
 key[255:0] ---------------------------------> |   AES-256 core      | --ciphertext--> parallel-to-serial --> ct_out
 start --(sync into aes_clk)-----------------> |   (aes_clk domain)  | --trigger
 done  <--(toggle sync into clk_ext)---------- +---------------------+
```

| module | role |
|---|---|
| `crsl_aes_top` | chip top: clocking, scan chain, core, serial output, clock-domain crossings |
| `aes256_core` | iterative AES-256, one round per clock |
| `aes_round_counter` | round sequencing, last-round select, trigger, done |
| `aes256_key_expand` | on-the-fly 256-bit key schedule |
| `aes_add_round_key`, `aes_sub_bytes` (`aes_sbox`), `aes_shift_rows`, `aes_mix_columns` (`aes_mix_column`) | AES steps |
| `aes_pkg` | GF(2^8) arithmetic and the S-box table, computed at elaboration |
| `scan_chain` | serial plaintext input |
| `p2s_converter` | serial ciphertext output |
| `slew_clk_buffer` | **behavioural model**: clock buffer with a switchable capacitor load |
| `cap_select` | capacitor enables from scan control or from random bits |
| `lfsr` | 16-bit LFSR with a TRNG bit mixed into its feedback (two instances) |
| `tunable_ro` | **behavioural model**: ring oscillator with a selectable length |
| `freq_divider` | three ripple T-flip-flops and a 4:1 clock mux |
| `freq_generator` | ring oscillator, its LFSR and the divider |
| `sync_2ff` | two-flip-flop synchronizer |

## The slewed clock and its model

On silicon, the slewed clock buffer is an ordinary clock buffer. Eight
transmission gates can hang a capacitor each on its output net. The gates are
controlled by enables i7..i0, which are `cap_en[7]`..`cap_en[0]`. The values are:

| enable | i7 | i6 | i5 | i4 | i3 | i2 | i1 | i0 |
|---|---|---|---|---|---|---|---|---|
| capacitance | 100 fF | 220 fF | 300 fF | 450 fF* | 870 fF* | 1.73 pF* | 3.46 pF* | 5 pF |

Values marked * are this design's choice. The published circuit fixes only the
three smallest capacitors and the 5 pF one, plus the 100 fF..5 pF range. The
chosen values include the loads whose supply-current overhead was characterised
(220 fF, 870 fF, 1.73 pF and 3.46 pF). On silicon the capacitors are standard-cell
decoupling cells.

The slew itself matters, but a two-state simulator cannot show a slope.
`slew_clk_buffer` models its timing consequences instead:

* **Delay.** Each edge crosses the switching threshold `T_BUF_PS + 0.69·R·C`
  after the input edge. The defaults are R = 200 Ω and 30 ps of intrinsic delay.
* **Duty-cycle distortion.** Rising edges are 1.5 times slower than falling
  edges, so the high phase shrinks as the load grows.
* **Lost edges.** The delay is inertial. A clock phase shorter than the delay is
  swallowed, which is what happens when the buffer cannot pull an oversized
  load through the switching point.

The effects that give the countermeasure its strength are not modelled. These
are the slew carried into each flip-flop, data-dependent latch timing,
slew-amplified RC delay across the clock tree, and mismatch. They are analog
effects of the real netlist. The silicon analysis found that the slew
changes no function: combinational delay does not depend on the clock slew,
and clock-to-Q delay grows with it, so hold margins stay positive. In this RTL,
every testbench configuration, including the 5 pF load, produces correct
ciphertext.

`cap_select` chooses the enables in one of two modes:

* **`scan_ctrl = 1`:** `cap_scan` is passed through unchanged. Any combination
  can be set, including none (a sharp clock).
* **`scan_ctrl = 0`:** three bits of an LFSR pick exactly one capacitor on every
  AES clock. Picks outside `ALLOW_MASK` fall back to i7. The default mask
  (`8'hF8`) allows i7..i3, so no random pick exceeds 870 fF. This keeps the
  maximum frequency, as the published design did.

The LFSR for the capacitors is clocked by the AES clock itself, so the load
changes from cycle to cycle.

## Clock randomization

* **Fine:** `tunable_ro` is a NAND-enabled ring oscillator. A multiplexer picks
  one of eight loop lengths. Its half period is
  `(1 + 2·(BASE_PAIRS + sel·STEP_PAIRS))·T_STAGE_PS`, which by default is
  81..193 stage delays of 20 ps, about 130–310 MHz. `sel` comes from an LFSR
  that is clocked by the oscillator, so the length changes every period.
* **Coarse:** `freq_divider` divides the oscillator by 2, 4 and 8 with three
  toggle flip-flops in a ripple chain. A 4:1 mux, driven by TRNG bits, forwards
  the oscillator itself or one of the three divided clocks.

The output is a clock whose period jumps between roughly 3 ns and 60 ns. The
mux is a plain clock mux, so a change of `sel` can produce one short phase.
The core's critical path therefore has to meet the undivided oscillator
frequency. The published design also tunes the oscillator through its supply.
That is analog and is not modelled. The TRNG is external, and its bits are
chip inputs (`trng[3:0]`).

A ring oscillator is a combinational loop. `tunable_ro` is therefore for
simulation only, and synthesis of anything above it reports the loop. On
silicon it is a hand-placed chain of standard cells.

## The AES-256 core

The datapath is 128 bits wide and does one full round per clock. The loop runs
in this order:

```
state_q -> AddRoundKey -> SubBytes -> ShiftRows -> MixColumns --+--> state_q
                    (round key r)                 last round: --+ bypass MixColumns
```

AddRoundKey sits at the register output, not in front of it. This has two
consequences:

* Round clock `r` (r = 0..13) applies round key `r` and then the substitution
  and mixing steps of round `r+1`.
* No separate output stage is needed. After the fourteenth round clock,
  AddRoundKey combines the register with round key 14, and its output is the
  ciphertext.

The register steps from the round-13 value to the round-14 value on the
fourteenth round clock. That transition is the Hamming-distance point used to
evaluate attacks on this design.

The key schedule works on the fly:

* A 256-bit register holds eight schedule words.
* The round key is its upper half on even rounds and its lower half on odd
  rounds.
* On every odd round the register advances by eight words (FIPS-197
  recurrence, with Rcon doubling from 01).

The S-box is a 256-entry table. A constant function in `aes_pkg` computes it
during elaboration (GF(2^8) inverse as x^254, then the affine map), so no table
file exists.

Timing, in AES clocks:

| clock | event |
|---|---|
| start edge (core idle) | plaintext and key loaded |
| +1 .. +14 | rounds 0..13, `trigger` (= `busy`) high |
| +15 | `done` high, `ciphertext` valid until the next start |

## Operating the chip

1. **Configure** while idle. Choose one of the configurations below.
2. **Load.** Shift the plaintext in MSB first on `scan_in`, with `scan_en` high,
   one bit per `clk_ext`. Drive `key`.
3. **Start.** Raise `start` and hold it until `trigger` rises. It is
   synchronised into the AES clock domain, and its rising edge starts the core.
   `start` also clears `done`. Hold plaintext and key until `done`.
4. **Read.** Completion flips a toggle in the AES domain, which is synchronised
   into `clk_ext`. It loads the ciphertext into the parallel-to-serial converter
   and raises `done`. `ct_out` then shows the MSB. Each `clk_ext` with
   `ct_shift` high moves to the next bit.

A toggle is used instead of a level because, on a fast randomized clock,
`done` may be low for less than one `clk_ext` period between two encryptions.

| configuration | `clk_sel` | `ro_en` | `scan_ctrl` | `cap_scan` |
|---|---|---|---|---|
| unprotected | 0 | x | 1 | `8'h00` |
| SL, fixed load | 0 | x | 1 | e.g. `8'h40` (220 fF) |
| SL, random load | 0 | x | 0 | x |
| CR | 1 | 1 | 1 | `8'h00` |
| CRSL | 1 | 1 | 0 or 1 | any load |

`trigger` and `aes_clk` are brought out for aligning measured traces. `trigger`
is high during the 14 round clocks.

## Where this RTL is its own

The block structure follows the published chip. It has the 128-bit scan chain,
the iterative AES-256 with last-round bypass, the round counter driving the
trigger, the key mux and expansion, the parallel-to-serial converter, the
capacitor bank selected by scan control or a TRNG-seeded LFSR, the
LFSR-controlled ring oscillator and the three-stage divider with its
TRNG-driven mux. The following are choices made here:

* the way the configurations are selected (`clk_sel`, `scan_ctrl`) and the
  clock-source mux;
* the 256-bit parallel key port (the source of the key on the chip is not
  given);
* the clock-domain split (scan and read-out on `clk_ext`) and the
  start/done synchronisation;
* the core latency of 15 clocks and `trigger = busy`;
* the shift direction of the scan chain and the converter;
* the LFSR width (16), polynomial (x^16+x^14+x^13+x^11+1) and seeding (TRNG bit
  XORed into the feedback every clock);
* one-hot random capacitor choice;
* the four middle capacitor values, drive resistance, rise/fall ratio,
  oscillator lengths and stage delay;
* the clocking of both LFSRs by their own generated clocks;
* asynchronous active-low reset everywhere.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M` and has a watchdog. The AES testbenches use
`tb/aes_ref_pkg.sv`, a reference written separately from the RTL. It builds
the S-box by exhaustive inverse search and uses the word-by-word key schedule.
The core is also checked against the FIPS-197 AES-256 example and the
SP 800-38A ECB-AES256 vectors.

```
verilator --binary --timing --assert --top-module tb_crsl_aes_top \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv rtl/*.sv tb/tb_crsl_aes_top.sv
./obj_dir/Vtb_crsl_aes_top
```

`--timing` is required, because the two behavioural models and the testbenches
use delays. All timing is in picoseconds (`timeunit 1ps`).

`tb_crsl_aes_top` runs the whole chip at its default sizes and takes about
half a minute. It encrypts 17 blocks across all configurations (FIPS-197 first,
then random blocks checked against the reference), reading each result back
serially. It checks that `trigger` spans exactly 14 AES clocks. It also counts
whether each mechanism actually happened, and fails if one never did:

* slewed edges;
* random load changes covering all five allowed capacitors;
* all eight oscillator lengths;
* all four divider settings;
* both clock sources.

`tb_load_sweep` covers the operating points at which the clock-load overhead
was characterised: 10 to 50 MHz, each with loads of 220 fF, 870 fF, 1.73 pF
and 3.46 pF. At each point it checks the ciphertext. It also checks that the
AES clock delay grows and its high time shrinks as the load increases. At
50 MHz with 3.46 pF the model gives 746 ps delay and a 49 % duty cycle.

The smaller testbenches check the block timing. `tb_slew_clk_buffer` checks
edge delays against `0.69·R·C` within 1 ps, and duty-cycle distortion.
`tb_tunable_ro` checks the period for each length, and `tb_freq_divider` the
division ratios. `tb_lfsr` checks the full 65535-state period and the seeded
recurrence.

## Limits

* The security of the design comes from analog behaviour: slew inside the
  flip-flops, data-dependent latch timing, clock-tree RC and mismatch. None of
  it is visible in RTL simulation. The models give only timing shifts and lost
  edges.
* Synthesis of the top treats the two models as a wire (buffer) and a
  combinational loop (ring oscillator). A real implementation replaces them
  with placed standard cells: a clock buffer, transmission gates, decoupling
  cells, and inverter chains with a tap mux.
* The clock muxes are not glitch-free. Change `clk_sel` and `ro_en` only while
  the core is idle. The divider select comes from the TRNG and may change at
  any time, so the core's timing has to tolerate the short phase this can
  produce.
