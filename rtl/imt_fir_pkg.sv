// imt_fir_pkg: constants of the direct-form FIR filter built on the same
// building blocks as the lattice filter (RAM of state variables, coefficient
// ROM, address sequencers, control unit, scalar product processor).
// The number of taps and the coefficient values are this design's choice:
// TAPS = 8 and a symmetric low-pass set a = 0.05 0.1 0.15 0.2 0.2 0.15 0.1
// 0.05 in Q1.15 (sum 1.0, so a full-scale DC input gives a full-scale output
// less the rounding of each term).
package imt_fir_pkg;

  parameter int W    = 16;
  parameter int TAPS = 8;

  typedef logic signed [W-1:0] fir_coef_t [TAPS];

  parameter fir_coef_t FIR_COEFS = '{
    16'sd1638, 16'sd3277, 16'sd4915, 16'sd6554,
    16'sd6554, 16'sd4915, 16'sd3277, 16'sd1638
  };

endpackage
