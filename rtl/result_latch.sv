// result_latch: storage for a MAC result and its saturation flag.
//
// Captures the rounded, saturated output of a multiplier-accumulator, together
// with the flag telling that saturation occurred, in the last cycle of a slot
// and holds both through the next slot.  There the result is the addend or
// multiplicand of the next operation and the value written to a delay line;
// the flag is reported to the filter's status output.  The block is called a
// latch in the architecture; it is built as an enable flip-flop register so
// that the whole filter is one synchronous clock domain (a transparent latch
// would close a loop from the MAC output back to its operand bus in the cycle
// it is open).  Synchronous active-low reset clears it.
// Timing: q and q_ovf are the inputs of the last cycle with en=1.
module result_latch #(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  input  logic         d_ovf,
  output logic [W-1:0] q,
  output logic         q_ovf
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q     <= '0;
      q_ovf <= 1'b0;
    end else if (en) begin
      q     <= d;
      q_ovf <= d_ovf;
    end
  end

endmodule
