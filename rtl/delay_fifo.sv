// delay_fifo: first-in/first-out register holding delayed lattice states.
//
// A DEPTH-word circular buffer with separate push and pop.  The oldest word is
// always visible at q, so a consumer reads it for a whole slot and pops it at
// the end.  Push and pop may happen in the same cycle, also when the FIFO is
// full (the head leaves as the new word enters).  The lattice keeps its
// delayed states g_i(n-1) here: they are read in the order they were written
// one sample period earlier.  Reset leaves INIT_COUNT zero words in the FIFO,
// i.e. the filter starts from a zero state.  Pushing into a full FIFO without
// popping, or popping an empty one, is an error (checked by assertions).
// Timing: q and count change one clock after push/pop.
// The FIFO as the lattice's delay element follows the architecture; the
// circular-buffer construction and the reset contents are this design's own.
module delay_fifo #(
  parameter int W          = 16,
  parameter int DEPTH      = 7,
  parameter int INIT_COUNT = 7
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  logic                       pop,
  input  logic [W-1:0]               d,
  output logic [W-1:0]               q,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int CW = $clog2(DEPTH + 1);

  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] rd_ptr, wr_ptr;

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
      rd_ptr <= '0;
      wr_ptr <= PW'(INIT_COUNT % DEPTH);
      count  <= CW'(INIT_COUNT);
    end else begin
      if (push) begin
        mem[wr_ptr] <= d;
        wr_ptr      <= inc(wr_ptr);
      end
      if (pop) rd_ptr <= inc(rd_ptr);
      count <= count + CW'(push) - CW'(pop);
    end
  end

  assign q = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!(push && !pop && 32'(count) == DEPTH)) else $error("delay_fifo: push into full FIFO");
      assert (!(pop && count == 0)) else $error("delay_fifo: pop from empty FIFO");
    end
  end

endmodule
