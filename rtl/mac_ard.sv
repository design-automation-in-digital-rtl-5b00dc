// mac_ard: bit-serial multiplier-accumulator with rounding and overflow control.
//
// Computes so = sat(d + round(k * x))  (or d - k*x when sub=1) for 16-bit
// Q1.15 operands.  The coefficient k is loaded into a parallel-in/serial-out
// register and leaves it two bits per clock; a radix-4 Booth recoder turns
// each bit triple into a digit in {-2,-1,0,1,2}, a selector forms digit*x on
// W+2 bits, and one W+2-bit adder adds it to the high accumulator word.  The
// sum is divided by four (arithmetic shift right by two) back into the high
// word, and the two bits shifted out enter a low accumulator word from the
// top.  After STEPS = W/2 steps {hi, lo[W+1:2]} is the exact 2W+2-bit product.  The
// output stage rounds the product to Q1.15 (round half up: add 2^14, drop 15
// bits), adds the addend d and saturates the sum to the W-bit range; ovf
// flags a saturated result.  Subtraction negates every Booth digit.
//
// Interface and timing:
//   ld  - first step: loads k into the shift register and adds digit 0
//         (taken straight from k) to a cleared accumulator.
//   se  - one further step (digits 1..7); 7 cycles with se after ld.
//   x, sub must be stable from ld to the last step; d is read only by the
//   combinational output, so/ovf are valid in the cycle after the 8th step
//   and stay valid until the next ld.  Holding ld and se low freezes the
//   accumulator (a MAC idle in a slot does no switching in its datapath).
//   xch - exchange: swaps the high and low registers in one clock; so then
//         shows the product of the swapped words.  Only legal with ld, se low.
//
// The Booth radix-4 serial-parallel structure, the W+2 adder width and the
// divide-by-four accumulator follow the architecture's scalar product
// processor, and so do its two W+2-bit accumulator registers (here the high
// and low product words) with the exchange multiplexers between them: the
// adder output can be routed to the low register and the low register to the
// high one.  How exchange is sequenced is not specified; here it is a cycle
// of its own (xch, with ld and se low) that swaps the two registers without
// shifting, so a second value can be parked in the low register and brought
// back.  The lattice and FIR filters never use it and tie xch low.  The
// rounding mode and saturation to the sample range are this design's choices.
module mac_ard #(
  parameter int W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ld,
  input  logic                se,
  input  logic                xch,
  input  logic                sub,
  input  logic signed [W-1:0] k,
  input  logic signed [W-1:0] x,
  input  logic signed [W-1:0] d,
  output logic signed [W-1:0] so,
  output logic                ovf
);

  localparam int AW = W + 2;          // selector / adder / high word width

  logic        [W:0]    piso;         // coefficient with the Booth guard bit below
  logic signed [AW-1:0] hi;           // high accumulator word
  logic        [AW-1:0] lo;           // low accumulator word (bits shifted out of hi)

  logic [2:0]           triple;       // Booth bit triple of this step
  logic signed [AW-1:0] sel;          // digit * x
  logic signed [AW-1:0] sum;
  logic signed [AW-1:0] hi_in;
  logic        [W-1:0]  lo_in;        // lo without the two bits that drop out

  // the first step reads its triple straight from k; later ones from the PISO
  always_comb begin
    triple = ld ? {k[1:0], 1'b0} : piso[2:0];
    hi_in  = ld ? '0 : hi;
    lo_in  = ld ? '0 : lo[AW-1:2];
  end

  // Booth recoder and selection: digit = -2*b2 + b1 + b0, negated for sub
  always_comb begin
    logic signed [AW-1:0] xe;
    logic signed [AW-1:0] mag;
    logic                 neg;
    xe = AW'(x);
    unique case (triple)
      3'b000, 3'b111: begin mag = '0;      neg = 1'b0; end
      3'b001, 3'b010: begin mag = xe;      neg = 1'b0; end
      3'b011:         begin mag = xe <<< 1; neg = 1'b0; end
      3'b100:         begin mag = xe <<< 1; neg = 1'b1; end
      default:        begin mag = xe;      neg = 1'b1; end   // 101, 110
    endcase
    sel = (neg ^ sub) ? -mag : mag;
    sum = hi_in + sel;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      piso <= '0;
      hi   <= '0;
      lo   <= '0;
    end else if (ld || se) begin
      piso <= ld ? (W+1)'($signed({k, 1'b0}) >>> 2) : (W+1)'($signed(piso) >>> 2);
      hi   <= sum >>> 2;
      lo   <= {sum[1:0], lo_in};
    end else if (xch) begin
      // exchange: adder (digit 0, so the high word) to the low register,
      // low register to the high one
      hi   <= $signed(lo);
      lo   <= hi;
    end
  end

  // exchange shares the register inputs with the Booth steps
  assert property (@(posedge clk) disable iff (!rst_n) xch |-> !(ld || se))
    else $error("mac_ard: xch together with a multiplier step");

  // output stage: round the Q2.30 product to Q1.15, add d, saturate
  logic signed [2*W+1:0] prod;        // {hi, lo} = k * x (or -k * x); lo[1:0] stays 0
  logic signed [W+3:0]   prod_r;      // rounded product, Q1.15 units
  logic signed [W+3:0]   acc;
  localparam logic signed [W+3:0] MAXV = (W+4)'((1 <<< (W-1)) - 1);
  localparam logic signed [W+3:0] MINV = -(W+4)'(1 <<< (W-1));

  always_comb begin
    prod   = {hi, lo[AW-1:2]};
    prod_r = (W+4)'((prod + (2*W+2)'(1 <<< (W-2))) >>> (W-1));
    acc    = prod_r + (W+4)'(d);
    ovf    = (acc > MAXV) || (acc < MINV);
    if (acc > MAXV)      so = MAXV[W-1:0];
    else if (acc < MINV) so = MINV[W-1:0];
    else                 so = acc[W-1:0];
  end

endmodule
