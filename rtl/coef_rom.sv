// coef_rom: coefficient ROM.
//
// Holds DEPTH coefficients (k0..k15 of the lattice filter, a0..a7 of the FIR
// example) and returns the word at adr combinationally.  Addresses at or
// beyond DEPTH read zero.  The contents come from a package constant, so a
// new coefficient set means a new parameter value, not new logic.
//
// Two versions give the same behaviour, selected by ASIC_STYLE:
//   0 - behavioural table lookup, for an FPGA flow;
//   1 - standard-cell ROM without a memory generator: an address decoder
//       raises one word line, and each word line enables a driver that puts
//       its constant word on the output bus (buf3n, the logic form of a
//       3-state buffer matrix).
// The two versions and the contents held in a package follow the
// architecture's description; the zero beyond DEPTH is a choice made here.
module coef_rom #(
  parameter int W          = 16,
  parameter int DEPTH      = 16,
  parameter bit ASIC_STYLE = 1'b0,
  parameter logic signed [W-1:0] CONTENTS [DEPTH] = lattice_pkg::DEFAULT_COEFS
) (
  input  logic [$clog2(DEPTH)-1:0] adr,
  output logic signed [W-1:0]      q
);

  if (ASIC_STYLE) begin : g_matrix
    logic [DEPTH-1:0]        word_line;
    logic [DEPTH-1:0][W-1:0] words;

    always_comb begin
      for (int i = 0; i < DEPTH; i++) begin
        word_line[i] = (32'(adr) == i);
        words[i]     = CONTENTS[i];
      end
    end

    buf3n #(.W(W), .N(DEPTH)) matrix (.en(word_line), .d(words), .q(q));
  end else begin : g_table
    always_comb begin
      q = '0;
      for (int i = 0; i < DEPTH; i++)
        if (32'(adr) == i) q = CONTENTS[i];
    end
  end

endmodule
