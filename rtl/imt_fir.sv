// imt_fir: direct-form FIR filter on the low-power scalar-product architecture.
//
// y(n) = sum_{i=0}^{TAPS-1} a_i x(n-i), with 16-bit Q1.15 samples and
// coefficients.  The state variables x(n-i) live in a RAM and the
// coefficients a_i in a ROM; each memory has its own address sequencer, a
// control unit drives the sequencers, the RAM write and the scalar product
// processor, and an output register holds y(n).  The scalar product processor
// is the bit-serial Booth multiplier-accumulator (mac_ard) with a partial-sum
// register: operation i computes s_i = sat(s_(i-1) + round(a_i x(n-i))),
// s_(-1) = 0, so every term is rounded to 16 bits and every partial sum is
// saturated.
//
// Interface: a sample is taken when in_valid and in_ready are both high at a
// clock edge; 9*TAPS clocks later dout holds y(n) and out_valid is high for
// one cycle, in which in_ready is high again (throughput one sample per
// 9*TAPS+1 clocks).  Synchronous active-low reset clears the sample history.
// ASIC_STYLE selects the memory versions: 0 behavioural RAM and ROM (FPGA),
// 1 decoder/register/driver matrices (standard cells); both behave the same.
//
// The block structure (RAM of states and ROM of coefficients with their
// sequencers, control unit, scalar product processor, output register)
// follows the architecture's FIR example; the number of taps, the
// coefficients, the handshake and the per-term rounding are this design's
// own.
module imt_fir
  import imt_fir_pkg::*;
#(
  parameter fir_coef_t COEFS = FIR_COEFS,
  parameter bit ASIC_STYLE = 1'b0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] din,
  input  logic                in_valid,
  output logic                in_ready,
  output logic signed [W-1:0] dout,
  output logic                out_valid,
  output logic                sat
);

  localparam int AW = $clog2(TAPS);

  logic          accept, mac_ld, mac_se, first, acc_en, seq_step, out_en;
  logic [AW-1:0] wptr, ram_adr, rom_adr;
  logic signed [W-1:0] x_i, a_i, psum, addend, so;
  logic          ovf, sat_q, out_valid_i;

  fir_ctrl #(.TAPS(TAPS), .STEPS(W/2)) cu (
    .clk, .rst_n, .in_valid, .in_ready, .accept, .mac_ld, .mac_se, .first,
    .acc_en, .seq_step, .out_en, .out_valid(out_valid_i));

  // write pointer: the slot the next sample overwrites (the oldest one)
  addr_seq #(.N(TAPS), .DOWN(1'b0)) seq_w (
    .clk, .rst_n, .load(1'b0), .start('0), .step(accept), .addr(wptr));
  // RAM read sequencer: newest sample first, then backwards in time
  addr_seq #(.N(TAPS), .DOWN(1'b1)) seq_ram (
    .clk, .rst_n, .load(accept), .start(wptr), .step(seq_step), .addr(ram_adr));
  // ROM sequencer: a_0 first
  addr_seq #(.N(TAPS), .DOWN(1'b0)) seq_rom (
    .clk, .rst_n, .load(accept), .start('0), .step(seq_step), .addr(rom_adr));

  state_ram #(.W(W), .DEPTH(TAPS), .ASIC_STYLE(ASIC_STYLE)) ram (
    .clk, .rst_n, .we(accept), .wadr(wptr), .d(din), .radr(ram_adr), .q(x_i));

  coef_rom #(.W(W), .DEPTH(TAPS), .ASIC_STYLE(ASIC_STYLE), .CONTENTS(COEFS)) rom (.adr(rom_adr), .q(a_i));

  // scalar product processor: MAC plus partial-sum register
  assign addend = first ? '0 : psum;

  mac_ard #(.W(W)) spp (
    .clk, .rst_n, .ld(mac_ld), .se(mac_se), .xch(1'b0), .sub(1'b0),
    .k(a_i), .x(x_i), .d(addend), .so(so), .ovf(ovf));

  pipo #(.W(W)) acc (.clk, .rst_n, .en(acc_en), .d(so), .q(psum));

  // output register, with the sticky flag that any term of y(n) saturated
  pipo #(.W(W)) outreg (.clk, .rst_n, .en(out_en), .d(so), .q(dout));

  always_ff @(posedge clk) begin
    if (!rst_n)                  sat_q <= 1'b0;
    else if (accept)             sat_q <= 1'b0;
    else if (acc_en || out_en)   sat_q <= sat_q || ovf;
  end

  assign out_valid = out_valid_i;
  assign sat       = out_valid_i && sat_q;

endmodule
