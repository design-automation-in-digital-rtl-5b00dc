// lattice_pkg: types and constants shared by the lattice FIR-IIR filter.
//
// The filter works on 16-bit two's-complement samples and 16-bit reflection
// coefficients, both read as Q1.15 fractions.  A sample period is split into
// SLOTS coefficient slots (one per reflection coefficient k0..k15); each slot
// lasts SLOT_CYCLES clocks: STEPS radix-4 Booth steps of the serial-parallel
// multiplier plus one cycle in which the rounded, saturated result is stored.
// 16 slots x 9 cycles = 144 clocks per sample, i.e. a 2.304 MHz clock for a
// 16 kHz sample rate.
//
// DEFAULT_COEFS is the coefficient table the ROM holds unless a parameter
// overrides it.  The real table is patient data chosen by the hearing-aid
// fitting; the values here are an arbitrary set with |k| < 1, which keeps the
// all-pole half stable.  k0..k7 belong to the FIR lattice, k8..k15 to the IIR
// lattice (k8 is the stage next to the FIR output, k15 the one next to the
// filter output).
//
// ctl_t is the control word of the slot sequencer (seq_lat).  The *_en bus
// fields are one-hot driver enables of the operand buses; the remaining flags
// are either levels valid for the whole slot or strobes already qualified
// with the end-of-slot cycle; the two push strobes come one cycle later, when
// the mac2 result has reached its result register.
package lattice_pkg;

  parameter int W           = 16;   // sample and coefficient width
  parameter int SLOTS       = 16;   // coefficients k0..k15, one slot each
  parameter int STEPS       = 8;    // radix-4 Booth steps for a W-bit coefficient
  parameter int SLOT_CYCLES = STEPS + 1;
  parameter int ORDER       = 8;    // order of each lattice half
  parameter int FIR_SLOTS   = ORDER; // slots 0..7: FIR, 8..15: IIR

  typedef logic signed [W-1:0] sample_t;
  typedef sample_t coef_table_t [SLOTS];

  // Q1.15 values: 0.5 -0.3 0.2 -0.1 0.25 -0.2 0.1 0.05 | 0.6 -0.4 0.3 -0.2 0.15 -0.1 0.05 0.02
  parameter coef_table_t DEFAULT_COEFS = '{
    16'sd16384, -16'sd9830, 16'sd6554, -16'sd3277,
    16'sd8192,  -16'sd6554, 16'sd3277,  16'sd1638,
    16'sd19661, -16'sd13107, 16'sd9830, -16'sd6554,
    16'sd4915,  -16'sd3277, 16'sd1638,  16'sd655
  };

  // operand bus X1 (multiplicand of mac1) driver indices
  typedef enum int { X1_PREV_IN = 0, X1_FIR_FIFO = 1, X1_IIR_FIFO = 2, X1_PREV_OUT = 3 } x1_src_e;
  // operand bus D1 (addend of mac1) driver indices
  typedef enum int { D1_IN = 0, D1_LAT1 = 1 } d1_src_e;
  // operand bus X2 (multiplicand of mac2) driver indices
  typedef enum int { X2_HOLD = 0, X2_LAT1 = 1 } x2_src_e;

  typedef struct packed {
    logic [3:0] rom_adr;     // coefficient address = slot number
    logic [3:0] x1_en;       // one-hot, indexed by x1_src_e
    logic [1:0] d1_en;       // one-hot, indexed by d1_src_e
    logic [1:0] x2_en;       // one-hot or zero, indexed by x2_src_e
    logic       mac1_sub;    // mac1 computes d - k*x (IIR forward path)
    logic       mac2_en;     // mac2 works in this slot
    logic       fir_pop;     // strobe: FIR delay line pop
    logic       fir_push;    // strobe: FIR delay line push (cycle after a mac2 result)
    logic       iir_pop;     // strobe: IIR delay line pop
    logic       iir_push;    // strobe: IIR delay line push (cycle after a mac2 result)
    logic       lat1_en;     // strobe: store mac1 result
    logic       lat2_en;     // strobe: store mac2 result
    logic       hold_en;     // strobe: keep coefficient and mac1 operands for mac2
    logic       in_take;     // strobe: capture the next input sample
    logic       out_load;    // strobe: update the output register
  } ctl_t;

endpackage
