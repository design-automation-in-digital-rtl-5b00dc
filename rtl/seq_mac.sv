// seq_mac: MAC sequencer, the cycle level of the hierarchical schedule.
//
// Counts the STEPS+1 cycles of one coefficient slot and tells the
// multiplier-accumulators what to do in each:
//   cycle 0           load : load the coefficient, first Booth step
//   cycles 1..STEPS-1 se   : further Booth steps
//   cycle STEPS       slot_end : results are complete; they are stored and
//                     the slot sequencer advances at the end of this cycle.
// Runs freely from reset (synchronous, active low), starting with cycle 0.
// The split of the slot into these cycles is this design's choice; the slot
// length of 9 clocks follows from 16 slots in the 144 clocks available per
// sample at a 2.3 MHz clock and a 16 kHz sample rate.
module seq_mac #(
  parameter int STEPS = 8
) (
  input  logic clk,
  input  logic rst_n,
  output logic load,
  output logic se,
  output logic slot_end
);

  localparam int CW = $clog2(STEPS + 1);

  logic [CW-1:0] cyc;

  always_ff @(posedge clk) begin
    if (!rst_n)                   cyc <= '0;
    else if (32'(cyc) == STEPS)   cyc <= '0;
    else                          cyc <= cyc + 1'b1;
  end

  always_comb begin
    load     = (cyc == '0);
    se       = (cyc != '0) && (32'(cyc) < STEPS);
    slot_end = (32'(cyc) == STEPS);
  end

endmodule
