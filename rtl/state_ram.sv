// state_ram: RAM of the filter state variables x(n-i).
//
// DEPTH words of W bits, one write port and one read port.  The write is
// synchronous (we high at a clock edge stores d at wadr); the read is
// asynchronous, so q shows the word at radr in the same cycle.  A write and a
// read of the same address in one cycle read the old word.  Reset clears
// every word, i.e. the filter starts from a zero history.
//
// Two versions give the same behaviour, selected by ASIC_STYLE:
//   0 - behavioural array, which an FPGA flow maps to distributed RAM;
//   1 - standard-cell matrix: a write decoder raises one word line, each word
//       is a register loaded by its word line, and a read decoder enables one
//       word driver onto the output bus (buf3n).  The storage cells are
//       edge-triggered enable registers rather than latches, so the whole
//       design keeps one clock edge and no level-sensitive timing.
// A RAM of state variables with its own sequencer, and the two versions
// (matrix for ASICs, behavioural for FPGAs), follow the architecture's
// description; ports, read timing, reset and registers in place of latches
// are choices made here.
module state_ram #(
  parameter int W          = 16,
  parameter int DEPTH      = 8,
  parameter bit ASIC_STYLE = 1'b0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] wadr,
  input  logic [W-1:0]             d,
  input  logic [$clog2(DEPTH)-1:0] radr,
  output logic [W-1:0]             q
);

  if (ASIC_STYLE) begin : g_matrix
    logic [DEPTH-1:0]        wr_line, rd_line;
    logic [DEPTH-1:0][W-1:0] words;

    always_comb begin
      for (int i = 0; i < DEPTH; i++) begin
        wr_line[i] = we && (32'(wadr) == i);
        rd_line[i] = (32'(radr) == i);
      end
    end

    for (genvar i = 0; i < DEPTH; i++) begin : g_word
      pipo #(.W(W)) store (.clk, .rst_n, .en(wr_line[i]), .d(d), .q(words[i]));
    end

    buf3n #(.W(W), .N(DEPTH)) rd_matrix (.en(rd_line), .d(words), .q(q));
  end else begin : g_array
    logic [W-1:0] mem [DEPTH];

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
      end else if (we) begin
        mem[wadr] <= d;
      end
    end

    assign q = mem[radr];
  end

endmodule
