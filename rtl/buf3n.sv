// buf3n: array of enabled bus drivers forming one operand bus.
//
// The architecture joins the sources of each MAC operand with 3-state buffer
// arrays on a shared bus.  Internal 3-state nets have no meaning in a
// two-state simulator and are turned into logic by synthesis anyway, so the
// bus is built here as its usual logic equivalent: each driver is gated by its
// enable and the gated words are ORed.  At most one enable may be active (an
// assertion checks it); with none active the bus reads zero, where a 3-state
// bus would float.  Purely combinational.
// The 3-state buffer arrays and their use as operand buses follow the
// original design; the AND-OR form is the substitution described above.
module buf3n #(
  parameter int W = 16,
  parameter int N = 2
) (
  input  logic [N-1:0]        en,
  input  logic [N-1:0][W-1:0] d,
  output logic [W-1:0]        q
);

  always_comb begin
    q = '0;
    for (int i = 0; i < N; i++)
      q |= d[i] & {W{en[i]}};
  end

  // two drivers on one bus would be a short circuit in the 3-state original
  always_comb assert ($onehot0(en)) else $error("buf3n: more than one driver enabled: %b", en);

endmodule
