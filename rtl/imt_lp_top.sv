// imt_lp_top: the two filters built from the low-power DSP building blocks,
// side by side.
//
//  - lattice_filter: the hearing-aid frequency-shaping filter, an 8th-order
//    lattice FIR followed by an 8th-order lattice all-pole IIR on two
//    bit-serial Booth MACs, one sample every 144 clocks (16 kHz at
//    2.304 MHz).  Ports lat_*.
//  - imt_fir: a direct-form FIR filter on one MAC with a state RAM, a
//    coefficient ROM, address sequencers and a control unit.  Ports fir_*.
//
// The two share only the clock and the synchronous active-low reset; each
// keeps its own interface and timing (see the two modules).  Parameters are
// the two coefficient tables and ASIC_STYLE, which picks the memory versions
// of both filters: 0 behavioural (for FPGAs), 1 decoder/driver matrices (for
// standard-cell ASICs).
module imt_lp_top
  import lattice_pkg::coef_table_t, lattice_pkg::DEFAULT_COEFS, lattice_pkg::sample_t;
  import imt_fir_pkg::fir_coef_t, imt_fir_pkg::FIR_COEFS;
#(
  parameter coef_table_t LAT_COEFS = DEFAULT_COEFS,
  parameter fir_coef_t   FIR_TABLE = FIR_COEFS,
  parameter bit          ASIC_STYLE = 1'b0
) (
  input  logic    clk,
  input  logic    rst_n,
  // lattice FIR-IIR filter
  input  sample_t lat_din,
  output logic    lat_in_take,
  output sample_t lat_dout,
  output logic    lat_out_valid,
  output logic    lat_sat,
  // direct-form FIR filter
  input  sample_t fir_din,
  input  logic    fir_in_valid,
  output logic    fir_in_ready,
  output sample_t fir_dout,
  output logic    fir_out_valid,
  output logic    fir_sat
);

  lattice_filter #(.COEFS(LAT_COEFS), .ASIC_STYLE(ASIC_STYLE)) lattice (
    .clk, .rst_n, .din(lat_din), .in_take(lat_in_take), .dout(lat_dout),
    .out_valid(lat_out_valid), .sat(lat_sat));

  imt_fir #(.COEFS(FIR_TABLE), .ASIC_STYLE(ASIC_STYLE)) fir (
    .clk, .rst_n, .din(fir_din), .in_valid(fir_in_valid), .in_ready(fir_in_ready),
    .dout(fir_dout), .out_valid(fir_out_valid), .sat(fir_sat));

endmodule
