// pipo: parallel-in/parallel-out register.
//
// A W-bit edge-triggered register with a load enable.  In the lattice filter
// it keeps values that must outlive the slot in which they appear: the input
// sample and its predecessor, the previous output, the coefficient and the
// operands that mac2 reuses one slot after mac1.  The enable stands for the
// sequencer-controlled clock of the original register; here every register
// runs on the one master clock.  Synchronous active-low reset to zero.
// Timing: q follows d one clock after en=1.
// The parallel register is one of the architecture's named building blocks;
// the load enable in place of a sequencer-gated clock is a choice made here.
module pipo #(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= d;
  end

endmodule
