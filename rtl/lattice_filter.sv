// lattice_filter: 16-bit lattice FIR-IIR filter (order 8 + 8) on two bit-serial MACs.
//
// Frequency-shaping filter of a hearing aid: an 8th-order lattice FIR section
// (reflection coefficients k0..k7) followed by an 8th-order all-pole lattice
// IIR section (k8..k15).  With f the forward and g the delayed-state path:
//   FIR, i = 0..7:  f_(i+1) = f_i + k_i g_i(n-1),  g_(i+1)(n) = g_i(n-1) + k_i f_i,
//                   f_0 = g_0 = x(n); stage 7 computes only f_8.
//   IIR, p = 7..0 (coefficient k_(15-p)):
//                   F_p = F_(p+1) - k_(15-p) G_p(n-1),
//                   G_(p+1)(n) = G_p(n-1) + k_(15-p) F_p,
//                   F_8 = f_8, y(n) = F_0 = G_0(n); stage p = 7 computes only F_7.
// All operations are d +/- k*x with rounding to 16 bits and saturation.
//
// Hardware: the sample period has 16 slots of 9 clocks (seq_mac counts the
// cycles, seq_lat the slots).  In slot s, mac1 computes the forward value for
// k_s, taking its addend from its own previous result (or the input sample)
// and its multiplicand from a delay line.  mac2 computes the delayed-state
// value for k_(s-1) one slot later, using the coefficient and mac1's operands
// of the previous slot kept in registers (pp2, ppd, ppx) - in the IIR half
// G_(p+1) needs the F_p that mac1 has only just produced.  Its last IIR
// operation runs in slot 0 of the next period, in parallel with the FIR work.
// Delay lines: ff71 holds g_1..g_7, ff72 holds G_1..G_7; g_0(n-1) = x(n-1) is
// in ppn and G_0(n-1) = y(n-1) is the output register ppo.  Operands reach
// the MACs over three enabled-driver buses (buf3n).
//
// Interface: din is captured at the clock edge that ends a cycle with
// in_take = 1, once every 144 clocks.  Exactly 144 clocks later dout takes the
// filtered value and out_valid is high for the following cycle.  sat pulses
// for one cycle after a slot in which a MAC result was saturated.
// Reset (rst_n low, synchronous) zeroes the filter state; the first period
// then filters a zero sample.  At 2.304 MHz the filter runs at 16 kHz.
// ASIC_STYLE selects the coefficient ROM version: 0 behavioural (FPGA),
// 1 decoder and driver matrix (standard cells); both behave the same.
//
// The block set (MAC_ARD, ROM, FIFO, PIPO, LATCH, SEQ_MAC, SEQ_LAT, BUF3N),
// the 16-bit width, the two MACs and the coefficient numbering follow the
// architecture; the slot schedule, the sign convention of the IIR section,
// the number format, the handshake strobes and the default coefficients are
// this design's own.
module lattice_filter
  import lattice_pkg::*;
#(
  parameter coef_table_t COEFS = DEFAULT_COEFS,
  parameter bit ASIC_STYLE = 1'b0
) (
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t din,
  output logic    in_take,
  output sample_t dout,
  output logic    out_valid,
  output logic    sat
);

  localparam int FIFO_DEPTH = ORDER - 1;   // g_1..g_7 and G_1..G_7

  ctl_t    ctl;
  logic    load, se, slot_end;
  sample_t k, k_prev;
  sample_t x_cur, x_prev, y_prev;
  sample_t fir_q, iir_q;
  sample_t bus_x1, bus_d1, bus_x2;
  sample_t hold_x1, hold_d1;
  sample_t so1, so2, r1, r2;
  logic    ovf1, ovf2, r1_ovf, r2_ovf;
  logic    lat1_done, lat2_done;
  logic [$clog2(FIFO_DEPTH+1)-1:0] fir_cnt, iir_cnt;   // delay line fill levels

  // ---------------- sequencers ----------------
  seq_mac #(.STEPS(STEPS)) sqmac (.clk, .rst_n, .load, .se, .slot_end);
  seq_lat #(.N_SLOTS(SLOTS)) sqlat (.clk, .rst_n, .slot_end, .ctl);

  // ---------------- coefficient path ----------------
  coef_rom #(.W(W), .DEPTH(SLOTS), .ASIC_STYLE(ASIC_STYLE), .CONTENTS(COEFS)) ro (.adr(ctl.rom_adr), .q(k));
  pipo #(.W(W)) pp2 (.clk, .rst_n, .en(ctl.hold_en), .d(k), .q(k_prev));

  // ---------------- input / output registers ----------------
  pipo #(.W(W)) pp0 (.clk, .rst_n, .en(ctl.in_take),  .d(din),   .q(x_cur));
  pipo #(.W(W)) ppn (.clk, .rst_n, .en(ctl.in_take),  .d(x_cur), .q(x_prev));
  pipo #(.W(W)) ppo (.clk, .rst_n, .en(ctl.out_load), .d(so1),   .q(y_prev));

  // ---------------- delay lines ----------------
  delay_fifo #(.W(W), .DEPTH(FIFO_DEPTH), .INIT_COUNT(FIFO_DEPTH)) ff71 (
    .clk, .rst_n, .push(ctl.fir_push), .pop(ctl.fir_pop), .d(r2), .q(fir_q), .count(fir_cnt));
  // one G value of the previous period is still in mac2 when a period starts
  delay_fifo #(.W(W), .DEPTH(FIFO_DEPTH), .INIT_COUNT(FIFO_DEPTH - 1)) ff72 (
    .clk, .rst_n, .push(ctl.iir_push), .pop(ctl.iir_pop), .d(r2), .q(iir_q), .count(iir_cnt));

  // ---------------- operand buses ----------------
  buf3n #(.W(W), .N(4)) bu_x1 (.en(ctl.x1_en), .d({y_prev, iir_q, fir_q, x_prev}), .q(bus_x1));
  buf3n #(.W(W), .N(2)) bu_d1 (.en(ctl.d1_en), .d({r1, x_cur}),   .q(bus_d1));
  buf3n #(.W(W), .N(2)) bu_x2 (.en(ctl.x2_en), .d({r1, hold_d1}), .q(bus_x2));

  // mac1's operands of the last slot, reused by mac2
  pipo #(.W(W)) ppx (.clk, .rst_n, .en(ctl.hold_en), .d(bus_x1), .q(hold_x1));
  pipo #(.W(W)) ppd (.clk, .rst_n, .en(ctl.hold_en), .d(bus_d1), .q(hold_d1));

  // ---------------- arithmetic ----------------
  mac_ard #(.W(W)) mac1 (
    .clk, .rst_n, .ld(load), .se(se), .xch(1'b0), .sub(ctl.mac1_sub),
    .k(k), .x(bus_x1), .d(bus_d1), .so(so1), .ovf(ovf1));

  mac_ard #(.W(W)) mac2 (
    .clk, .rst_n, .ld(load && ctl.mac2_en), .se(se && ctl.mac2_en), .xch(1'b0), .sub(1'b0),
    .k(k_prev), .x(bus_x2), .d(hold_x1), .so(so2), .ovf(ovf2));

  result_latch #(.W(W)) lao1 (.clk, .rst_n, .en(ctl.lat1_en), .d(so1), .d_ovf(ovf1), .q(r1), .q_ovf(r1_ovf));
  result_latch #(.W(W)) lao2 (.clk, .rst_n, .en(ctl.lat2_en), .d(so2), .d_ovf(ovf2), .q(r2), .q_ovf(r2_ovf));

  // ---------------- status ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lat1_done <= 1'b0;
      lat2_done <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      lat1_done <= ctl.lat1_en;
      lat2_done <= ctl.lat2_en;
      out_valid <= ctl.out_load;
    end
  end

  // schedule invariants: the FIR line is short by at most the one word whose
  // push follows its pop by a cycle; the IIR line runs two words behind, plus
  // that one cycle
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (32'(fir_cnt) >= FIFO_DEPTH - 1)
        else $error("lattice_filter: FIR delay line holds %0d words", fir_cnt);
      assert (32'(iir_cnt) >= FIFO_DEPTH - 3)
        else $error("lattice_filter: IIR delay line holds %0d words", iir_cnt);
    end
  end

  assign in_take = ctl.in_take;
  assign dout    = y_prev;
  assign sat     = (lat1_done && r1_ovf) || (lat2_done && r2_ovf);

endmodule
