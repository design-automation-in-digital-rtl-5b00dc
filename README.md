# Lattice FIR-IIR filter on bit-serial multiplier-accumulators

This is synthesizable SystemVerilog for a hearing-aid frequency-shaping filter.
The filter is an 8th-order lattice FIR section followed by an 8th-order
all-pole lattice IIR section, with 16-bit data and 16 reflection coefficients
k0..k15. The design uses no multiplier array. Two small multiplier-accumulators
(MACs) do all the arithmetic. Each MAC takes its coefficient two bits per clock
through a radix-4 Booth recoder. A fixed schedule of 16 "slots" per sample
moves operands between delay FIFOs, registers and the two MACs. One sample
takes 16 × 9 = 144 clocks, so a 2.304 MHz clock filters a 16 kHz audio stream.

The building blocks can be combined in other ways. The second design included
here is a direct-form FIR filter built from the same MAC together with a state
RAM, a coefficient ROM, address sequencers and a control unit. The top module
`imt_lp_top` holds both filters side by side.

## The lattice recursions

Samples and coefficients are two's-complement Q1.15 fractions. Every
operation in the filter has the form `d ± k·x`. The product is rounded to
Q1.15 (round half up), added to `d`, and saturated to the 16-bit range.

FIR section. f is the forward path and g the delayed-state path:

    f_0 = g_0(n) = x(n)
    f_(i+1)  = f_i + k_i · g_i(n-1)          i = 0..7
    g_(i+1)(n) = g_i(n-1) + k_i · f_i        i = 0..6   (stage 7 has no lower path)

IIR section. Stages are numbered p = 7..0 from the FIR side towards the
output, and stage p uses coefficient k_(15-p):

    F_8 = f_8
    F_p = F_(p+1) − k_(15-p) · G_p(n-1)      p = 7..0
    G_(p+1)(n) = G_p(n-1) + k_(15-p) · F_p   p = 6..0   (stage 7 has no lower path)
    y(n) = F_0 = G_0(n)

The FIR section adds in both paths. The IIR section subtracts in its forward
path: this is the textbook all-pole lattice, which is stable for any |k| < 1.
The sign convention is a choice made here; see *Departures* below.

## The schedule: 16 slots, two MACs

This is the part that needs the most explanation. There is one slot per
coefficient, and each slot is 9 clocks long. `mac1` always computes the
forward value that belongs to the slot's coefficient. `mac2` computes the
lower-path value of the *previous* slot's coefficient. To do that it takes the
coefficient and mac1's two operands from registers that were loaded at the end
of the previous slot.

mac2 has to lag one slot because of the IIR section: G_(p+1) needs F_p, and F_p
is mac1's result from the slot before. Applying the same lag in the FIR section
keeps the control uniform. As a result, mac2's last IIR operation (G_1) runs in
slot 0 of the next sample, in parallel with the first FIR stage.

| slot | coeff. | mac1 (forward path) | mac2 (lower path, coefficient of slot−1) | delay lines |
|---|---|---|---|---|
| 0 | k0 | f_1 = x(n) + k0·x(n−1) | G_1 = y(n−1) + k15·y(n) (previous sample) | push G_1 → ff72 |
| 1..7 | k_s | f_(s+1) = f_s + k_s·g_s(n−1) | g_s(n) = g_(s−1)(n−1) + k_(s−1)·f_(s−1) | pop ff71, push g_s(n) → ff71 |
| 8 | k8 | F_7 = f_8 − k8·G_7(n−1) | idle | pop ff72 |
| 9 | k9 | F_6 = F_7 − k9·G_6(n−1) | idle | pop ff72 |
| 10..14 | k_s | F_(15−s) = F_(16−s) − k_s·G_(15−s)(n−1) | G_(17−s) = G_(16−s)(n−1) + k_(s−1)·F_(16−s) | pop ff72, push → ff72 |
| 15 | k15 | y(n) = F_0 = F_1 − k15·y(n−1) | G_2 = G_1(n−1) + k14·F_1 | push → ff72; output and input update |

mac1 works in all 16 slots. mac2 works in 14 slots: its load and step strobes
are gated off in slots 8 and 9, so its datapath does not toggle there.

Where the operands come from (`seq_lat` decodes all of this from the slot
number):

| operand | slot 0 | slots 1..7 | slots 8..14 | slot 15 |
|---|---|---|---|---|
| mac1 x (bus X1) | `ppn` = x(n−1) | `ff71` head | `ff72` head | `ppo` = y(n−1) |
| mac1 d (bus D1) | `pp0` = x(n) | `lao1` (mac1's last result) | `lao1` | `lao1` |
| mac2 x (bus X2) | `lao1` | `ppd` (mac1's d from the last slot) | `lao1` from slot 10 | `lao1` |
| mac2 d | `ppx`: mac1's x from the last slot, in every slot | | | |
| mac2 k | `pp2`: ROM word of the last slot, in every slot | | | |

### Storage

- **ff71**: a 7-word FIFO holding g_1..g_7 of the previous sample. It is popped
  at the end of each of slots 1..7, and the new g_s(n) is pushed one cycle
  later. It therefore stays nearly full.
- **ff72**: a 7-word FIFO holding G_7..G_1 in the order they are read. Pops run
  two slots ahead of pushes, so its fill level moves between 5 and 7 (4 for the
  one cycle between a pop and the push that follows it). After
  reset it holds 6 zero words, because mac2's slot-0 operation supplies the
  seventh word.
- **ppn** holds g_0(n−1) = x(n−1). **ppo**, the output register, holds
  G_0(n−1) = y(n−1).
- **lao1** and **lao2** are the result registers of mac1 and mac2. Each also
  keeps the saturation flag of its result.
- Three operand buses (`buf3n`) select among these sources, each with a
  one-hot enable.

## The bit-serial MAC (`mac_ard`)

`mac_ard` computes `so = sat(d + round(±k·x))` in 8 Booth steps:

1. On `ld`, the coefficient k is loaded into a 17-bit shift register: k with a
   zero guard bit appended below. The first step uses the bit triple
   `{k[1:0],0}` directly.
2. Each step recodes a triple into a digit in {−2, −1, 0, 1, 2}. When `sub` is
   set, the digit is negated. The selector forms digit·x on W+2 = 18 bits, and
   a single 18-bit adder adds it to the high accumulator word.
3. The sum is shifted right arithmetically by two and goes back into the high
   word. The two bits that drop out enter an 18-bit low word from the top.
   After 8 steps, `{hi, lo[17:2]}` holds the exact 34-bit product, and
   `lo[1:0]` is zero.
4. The output logic is combinational. It adds 2^14, drops 15 bits, adds `d`
   and saturates; `ovf` reports that saturation happened.

Within a slot, cycle 0 is `ld` (load and step 1), cycles 1..7 are `se`
(steps 2..8), and cycle 8 stores the result in `lao1`/`lao2` and advances the
slot counter. `x` and `sub` must be stable from cycle 0 to cycle 7, and `d`
in cycle 8. The buses meet this, because every source changes only at slot
boundaries.

The MAC in the original architecture has two 18-bit accumulator registers
with multiplexers between them, controlled by an exchange input. Here the two
registers act as the high and low product words. The multiplexers are built:
a cycle with `xch` high (and `ld`, `se` low) sends the adder output to the
low register and the low register to the high one. Because no digit is added
and no shift happens, the effect is a plain swap of the two registers. A
second swap restores them, so a value can be parked in the low register. When
and why the original asserts exchange is not specified, so this one-cycle
swap is this design's reading. Both filters tie `xch` low. An assertion flags
`xch` together with a multiplier step.

## Interfaces and timing

`lattice_filter` (16-bit `din`/`dout`):

- The filter runs freely. `in_take` is high in the cycle whose closing clock
  edge captures `din`; this happens every 144 clocks, at the end of slot 15.
- Exactly 144 clocks after a sample is captured, `dout` takes its filtered
  value, and `out_valid` is high for the following cycle.
- `sat` pulses for one cycle after each slot in which a MAC result saturated.
  If both MACs saturate in the same slot, the two events give a single pulse.
- `rst_n` is synchronous and active low. It clears the whole state. The first
  sample period after reset filters a zero sample, so the first `out_valid`
  carries 0.
- The coefficients are the parameter `COEFS`, a 16-entry array of Q1.15
  words. Its default, `lattice_pkg::DEFAULT_COEFS`, is an arbitrary stable set
  (|k| ≤ 0.6). In the application the coefficient set depends on the patient
  and on the input loudness, so set it for the application.

`imt_fir` (direct-form FIR, y(n) = Σ a_i·x(n−i), default 8 taps):

- A sample is taken when `in_valid` and `in_ready` are both high at a clock
  edge. It is written into the state RAM at the write pointer, which
  overwrites the oldest sample.
- The control unit then runs one MAC operation per tap, 9 clocks each. The RAM
  sequencer walks backwards from the newest sample, and the ROM sequencer walks
  forwards from a_0. Each operation adds a_i·x(n−i) to the partial sum.
- After 9·TAPS = 72 clocks, `dout` updates and `out_valid` pulses. In that
  same cycle `in_ready` is high again, so a new sample can be taken every
  73 clocks.
- `sat` (valid with `out_valid`) says that some partial sum of this output
  saturated.
- Each term is rounded to 16 bits before it is added, which is less accurate
  than a wide accumulator. The default coefficients, in `imt_fir_pkg`, are a
  symmetric low-pass set that sums to 1.0.

`imt_lp_top` connects the two filters to one `clk` and `rst_n`. The lattice
filter's ports are prefixed `lat_` and the FIR filter's `fir_`.

## Two versions of the memories

The ROMs and the state RAM avoid vendor memory generators, so the same source
works in any flow. Each comes in two versions with identical behaviour. The
parameter `ASIC_STYLE` selects between them. It exists on `coef_rom`,
`state_ram`, both filters and the top.

- `ASIC_STYLE = 0` (the default) is the version for FPGAs. The ROM is a table
  lookup and the RAM is an array, so the FPGA tools map them to their own
  resources.
- `ASIC_STYLE = 1` is the version for standard cells. An address decoder
  raises one word line. In the ROM, each word line enables a driver holding a
  constant word onto the output bus (`buf3n`). In the RAM, a write decoder
  loads one word register, and a read decoder enables that word's driver onto
  the output bus.

In both versions, reads are asynchronous, writes are synchronous, and ROM
addresses beyond the table read zero.

## Departures and choices

These are not taken from the original design. Each was chosen here:

- **IIR sign convention.** The original data-flow drawing does not show signs.
  The forward IIR path subtracts, and every other path adds.
- **Slot schedule, operand routing, FIFO depths and control encoding.** The
  block types and the two-MAC structure are the original's. The routing
  between them was worked out from the filter's data flow. The original
  drawing shows two small FIFOs in front of mac2's operand inputs and one
  more parallel register, but not their exact wiring. Here, mac2 instead
  reads mac1's operands of the previous slot from the registers `ppx` and
  `ppd`, and its coefficient from `pp2`. The original's MAC also has three
  control pins without a described function; they are left out (see below).
- **9-cycle slots.** These come from the stated operating point: 2.3 MHz for
  16 kHz is about 144 clocks, or 16 slots of 9 cycles.
  A full-custom version of the original ran at 1.3 MHz, using a modified MAC
  that is not described. This design cannot run at 1.3 MHz: it would have
  only 81 clocks per sample.
- **Rounding and saturation.** Round half up, then saturate to the 16-bit
  range. The original only says that the MAC has overflow and rounding
  control.
- **"LATCH" blocks.** They are edge-triggered registers with an enable. A
  transparent latch would form a loop from the MAC output back to its own
  operand bus.
- **3-state buses.** They are AND-OR buses with a one-hot assertion, which is
  how synthesis maps internal 3-state nets in any case. This also applies to
  the driver matrices of the standard-cell memories.
- **RAM storage cells.** The standard-cell RAM stores each word in an
  enable register instead of a latch, so the design keeps a single clock edge.
- **MAC exchange.** The swap of the two accumulator registers is a
  one-cycle operation of its own. The original shows the multiplexers but
  not how they are sequenced.
- **Unused MAC pins.** The original MAC pins DCPL, LMSB and LLSB have no
  described function and are absent.
- **Coefficient values, handshake strobes, reset behaviour.** All are choices
  made here.
- **FIR example.** The tap count (8), word width (16), coefficients and
  valid/ready handshake are choices made here.
- **Hearing-aid system blocks.** Loudness estimation, the patient table and the
  pre-amplifier sit around the filter in the hearing aid. They are not part of
  this RTL: their function is not specified. The coefficient table enters as a
  parameter instead.

## Files

| file | contents |
|---|---|
| `rtl/lattice_pkg.sv` | widths, slot counts, default coefficients, control-word struct |
| `rtl/imt_fir_pkg.sv` | FIR tap count and default coefficients |
| `rtl/imt_lp_top.sv` | top: both filters |
| `rtl/lattice_filter.sv` | lattice FIR-IIR filter |
| `rtl/mac_ard.sv` | Booth radix-4 bit-serial MAC with rounding and saturation |
| `rtl/seq_mac.sv` | cycle sequencer (load / step / end of slot) |
| `rtl/seq_lat.sv` | slot sequencer and control decoder |
| `rtl/coef_rom.sv` | coefficient ROM, table or decoder/driver matrix, contents from a parameter |
| `rtl/delay_fifo.sv` | delay FIFO |
| `rtl/pipo.sv` | parallel register with load enable |
| `rtl/result_latch.sv` | MAC result register with saturation flag |
| `rtl/buf3n.sv` | enabled-driver operand bus |
| `rtl/imt_fir.sv` | direct-form FIR filter |
| `rtl/fir_ctrl.sv` | FIR control unit |
| `rtl/addr_seq.sv` | modulo address sequencer |
| `rtl/state_ram.sv` | state-variable RAM, array or decoder/register/driver matrix |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Every testbench checks its results itself and ends with a line
`TB_RESULT checks=N failures=M`. To build and run one with Verilator 5, from
the folder that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -y rtl rtl/lattice_pkg.sv rtl/imt_fir_pkg.sv \
        tb/tb_imt_lp_top.sv --top-module tb_imt_lp_top -Mdir obj_top
    ./obj_top/Vtb_imt_lp_top

Replace `tb_imt_lp_top` with any other testbench name. Each run takes well
under a second.

- `tb_imt_lp_top` runs both filters at the default parameters. It checks 300
  lattice outputs and 500 FIR outputs word for word against integer models of
  the recursions.
- It also checks the 144-clock and 72-clock latencies and the 144-clock sample
  rate. Its clock runs at 2.304 MHz, and it checks that lattice outputs come
  62.5 µs apart, i.e. at 16 kHz.
- It requires that saturation happens in both filters and that the FIR
  handshake stalls.
- `tb_lattice_filter` and `tb_imt_fir` test the two filters alone with similar
  stimulus: an impulse, random samples, full-scale random samples and DC.
  `tb_lattice_filter` also runs a second lattice filter in lock step, with
  large coefficients of both signs including −1.0 and the standard-cell ROM.
  `tb_imt_fir` runs a standard-cell copy of the FIR filter beside the FPGA
  version and compares the two in every cycle.
- `tb_coef_rom` and `tb_state_ram` check both memory versions.
- Assertions in `lattice_filter` check during simulation that the two delay
  FIFOs never fall below the fill levels the schedule implies.
- The testbenches of the building blocks check them against models. Examples:
  3000 random MAC operations plus corner cases such as −1 × −1, each followed
  by a double accumulator exchange; random FIFO
  traffic including a simultaneous push and pop while full; and the slot
  decoder's control word in every cycle of three sample periods.

All testbenches pass. Each testbench has also been run against a copy of its
module with one deliberate bug, and each one failed.

Nothing here was checked against data from the original hardware: the
coefficient sets and test signals of the original application are not
available. The models in the testbenches implement the recursions given
above. They are independent of the RTL's schedule, but they share its choices
on signs, rounding and saturation.

## Changing the design

- **New coefficients:** override `COEFS` on `lattice_filter` (`LAT_COEFS` on
  the top), or `COEFS` on `imt_fir` (`FIR_TABLE` on the top). No logic
  changes.
- **Different FIR length:** change `TAPS` in `imt_fir_pkg`. The latency
  follows as 9·TAPS clocks.
- **Different lattice order or word width:** the slot decode in `seq_lat`, the
  FIFO depths and the 4-bit slot counter assume 8 + 8 stages and 16 slots, so
  they need to change together with `lattice_pkg`. The MAC itself is
  parameterised by `W`, and takes W/2 Booth steps.
