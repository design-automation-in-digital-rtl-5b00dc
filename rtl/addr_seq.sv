// addr_seq: address sequencer of a RAM or ROM.
//
// A modulo-N address counter: load sets the address to start, step moves it
// by one, upwards (DOWN = 0) or downwards (DOWN = 1), wrapping between N-1
// and 0.  load wins over step.  The FIR filter uses one to walk the state RAM
// from the newest sample backwards, one to walk the coefficient ROM forwards
// and one as the RAM write pointer.  Synchronous active-low reset to 0;
// addr changes one clock after load or step.
// The architecture only names one sequencer per memory; the loadable modulo
// counter is this design's own.
module addr_seq #(
  parameter int N    = 8,
  parameter bit DOWN = 1'b0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic [$clog2(N)-1:0] start,
  input  logic                 step,
  output logic [$clog2(N)-1:0] addr
);

  localparam int AW = $clog2(N);

  always_ff @(posedge clk) begin
    if (!rst_n)    addr <= '0;
    else if (load) addr <= start;
    else if (step) begin
      if (DOWN) addr <= (addr == '0) ? AW'(N - 1) : addr - 1'b1;
      else      addr <= (32'(addr) == N - 1) ? '0 : addr + 1'b1;
    end
  end

endmodule
