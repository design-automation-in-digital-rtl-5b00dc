// seq_lat: slot sequencer, the sample level of the hierarchical schedule.
//
// Counts the 16 coefficient slots of one sample period, advancing only on the
// slot_end strobe of the MAC sequencer, and decodes the control word of the
// current slot (lattice_pkg::ctl_t).  Slot s uses coefficient k_s:
//   s = 0..7  FIR lattice: mac1 adds k_s * g_s(n-1) to the forward value;
//   s = 8..15 IIR lattice: mac1 subtracts k_s * g(n-1) from the forward value.
// mac2 computes the lower (delayed-state) path of the coefficient of slot s-1
// in slot s, with the coefficient and mac1's operands kept in registers, so it
// works in slots 1..7 (FIR) and 10..15 plus slot 0 of the next period (IIR);
// it is idle in slots 8 and 9.  Operand sources per slot:
//   X1 (mac1 multiplicand): 0 previous input, 1..7 FIR delay line,
//                           8..14 IIR delay line, 15 previous output
//   D1 (mac1 addend):       0 input sample, else mac1's last result
//   X2 (mac2 multiplicand): 1..7 mac1's addend of the last slot,
//                           10..15 and 0 mac1's last result
// Strobes (valid only in the slot_end cycle): FIR delay line pop in slots
// 1..7, IIR delay line pop in 8..14, input capture and output update at the
// end of slot 15.  The mac2 results of slots 1..7 (FIR) and 10..15, 0 (IIR)
// are pushed into the delay lines in the cycle after slot_end, from mac2's
// result register.  The schedule and encoding are this
// design's own; the architecture names the sequencer but not its signals.
module seq_lat
  import lattice_pkg::*;
#(
  parameter int N_SLOTS = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic slot_end,
  output ctl_t ctl
);

  logic [3:0] slot;
  logic       fir_push_q, iir_push_q;   // push strobes, one cycle after the result

  // mac2 results go to the FIR delay line in slots 1..7 and to the IIR delay
  // line in slots 10..15 and 0; they are pushed from the result register.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fir_push_q <= 1'b0;
      iir_push_q <= 1'b0;
    end else begin
      fir_push_q <= slot_end && slot != 4'd0 && 32'(slot) < FIR_SLOTS;
      iir_push_q <= slot_end && (slot == 4'd0 || 32'(slot) >= FIR_SLOTS + 2);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)                            slot <= '0;
    else if (slot_end && 32'(slot) == N_SLOTS - 1) slot <= '0;
    else if (slot_end)                     slot <= slot + 1'b1;
  end

  always_comb begin
    logic fir, iir, mac2_on;
    fir     = 32'(slot) < FIR_SLOTS;
    iir     = !fir;
    mac2_on = !(32'(slot) == FIR_SLOTS || 32'(slot) == FIR_SLOTS + 1);

    ctl = '0;
    ctl.rom_adr  = slot;
    if (slot == 4'd0)                  ctl.x1_en[X1_PREV_IN]  = 1'b1;
    else if (fir)                      ctl.x1_en[X1_FIR_FIFO] = 1'b1;
    else if (32'(slot) < N_SLOTS - 1)    ctl.x1_en[X1_IIR_FIFO] = 1'b1;
    else                               ctl.x1_en[X1_PREV_OUT] = 1'b1;

    if (slot == 4'd0) ctl.d1_en[D1_IN]   = 1'b1;
    else              ctl.d1_en[D1_LAT1] = 1'b1;

    if (fir && slot != 4'd0) ctl.x2_en[X2_HOLD] = 1'b1;
    else if (mac2_on)        ctl.x2_en[X2_LAT1] = 1'b1;

    ctl.mac1_sub  = iir;
    ctl.mac2_en   = mac2_on;
    ctl.fir_pop   = slot_end && fir && slot != 4'd0;
    ctl.fir_push  = fir_push_q;
    ctl.iir_pop   = slot_end && iir && 32'(slot) < N_SLOTS - 1;
    ctl.iir_push  = iir_push_q;
    ctl.lat1_en   = slot_end;
    ctl.lat2_en   = slot_end && mac2_on;
    ctl.hold_en   = slot_end;
    ctl.in_take   = slot_end && 32'(slot) == N_SLOTS - 1;
    ctl.out_load  = slot_end && 32'(slot) == N_SLOTS - 1;
  end

endmodule
