// fir_ctrl: control unit of the direct-form FIR filter.
//
// Waits for an input sample (valid/ready handshake), has it written into the
// state RAM, then runs TAPS multiply-accumulate operations of STEPS+1 cycles
// each on the scalar product processor:
//   cycle 0        mac_ld  (coefficient load, first Booth step)
//   cycles 1..7    mac_se  (further Booth steps)
//   cycle 8        acc_en  (partial sum stored), seq_step (next RAM/ROM word);
//                  in the last operation out_en (output register) instead.
// first is high during the first operation, whose addend is zero.
// Timing: a sample accepted at the end of cycle c gives the output register
// its new value at the end of cycle c + 9*TAPS; out_valid is high in the
// cycle after.  in_ready is high only while the unit is idle, so one sample
// is in flight at a time.  Synchronous active-low reset to idle.
// The architecture only names the control unit and the lines it drives; the
// FSM, the handshake and the cycle split are this design's own.
module fir_ctrl #(
  parameter int TAPS  = 8,
  parameter int STEPS = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  output logic accept,     // the sample is written into the RAM this cycle
  output logic mac_ld,
  output logic mac_se,
  output logic first,
  output logic acc_en,
  output logic seq_step,
  output logic out_en,
  output logic out_valid
);

  typedef enum logic { IDLE, RUN } state_e;

  localparam int CW = $clog2(STEPS + 1);
  localparam int TW = (TAPS > 1) ? $clog2(TAPS) : 1;

  state_e        state;
  logic [CW-1:0] cyc;
  logic [TW-1:0] tap;
  logic          last_cyc, last_tap;

  always_comb begin
    last_cyc = 32'(cyc) == STEPS;
    last_tap = 32'(tap) == TAPS - 1;
    in_ready = state == IDLE;
    accept   = in_ready && in_valid;
    mac_ld   = state == RUN && cyc == '0;
    mac_se   = state == RUN && cyc != '0 && !last_cyc;
    first    = tap == '0;
    acc_en   = state == RUN && last_cyc && !last_tap;
    seq_step = state == RUN && last_cyc;
    out_en   = state == RUN && last_cyc && last_tap;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= IDLE;
      cyc       <= '0;
      tap       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= out_en;
      unique case (state)
        IDLE: if (accept) begin
          state <= RUN;
          cyc   <= '0;
          tap   <= '0;
        end
        RUN: begin
          if (!last_cyc) cyc <= cyc + 1'b1;
          else begin
            cyc <= '0;
            if (last_tap) state <= IDLE;
            else          tap   <= tap + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
