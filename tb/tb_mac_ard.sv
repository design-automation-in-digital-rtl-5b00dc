// tb_mac_ard: self-checking test of the bit-serial Booth multiplier-accumulator.
//
// Each operation is one ld cycle followed by seven se cycles; the result must
// be present in the next cycle (9th of the slot) and stay there while the MAC
// is idle.  Expected values come from integer arithmetic:
// sat16(d +/- ((x*k + 2^14) >> 15)).  Corner operands (most negative values,
// full-scale products that saturate) come first, then random operations.
// After each operation the two accumulator registers are exchanged: the
// output must then show the product with its high 18 and low 16 bits traded
// places, and a second exchange must bring the original result back.
module tb_mac_ard;
  logic clk = 1'b0, rst_n = 1'b0;
  logic ld = 1'b0, se = 1'b0, xch = 1'b0, sub = 1'b0;
  logic signed [15:0] k = '0, x = '0, d = '0;
  logic signed [15:0] so;
  logic ovf;

  mac_ard #(.W(16)) dut (.clk, .rst_n, .ld, .se, .xch, .sub, .k, .x, .d, .so, .ovf);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, nsat = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // round, add and saturate a 34-bit product the way the output stage does
  function automatic int finish_so(input int dd, input logic signed [33:0] p, output bit o);
    longint v;
    v = longint'(dd) + ((longint'(p) + 64'sd16384) >>> 15);
    o = 1'b0;
    if (v > 32767)  begin v = 32767;  o = 1'b1; end
    if (v < -32768) begin v = -32768; o = 1'b1; end
    return int'(v);
  endfunction

  function automatic int expect_so(input int dd, input int xx, input int kk, input bit s, output bit o);
    longint p, v;
    p = longint'(xx) * longint'(kk);
    if (s) p = -p;
    v = longint'(dd) + ((p + 16384) >>> 15);
    o = 1'b0;
    if (v > 32767)  begin v = 32767;  o = 1'b1; end
    if (v < -32768) begin v = -32768; o = 1'b1; end
    return int'(v);
  endfunction

  task automatic op(input int dd, input int xx, input int kk, input bit s);
    int e; bit eo;
    @(negedge clk);
    k = 16'(kk); x = 16'(xx); d = 16'(dd); sub = s;
    ld = 1'b1;
    @(negedge clk);
    ld = 1'b0; se = 1'b1;
    // scramble k during the steps: only the loaded copy may matter
    k = 16'($urandom);
    repeat (6) @(negedge clk);
    @(negedge clk);
    se = 1'b0;
    e = expect_so(dd, xx, kk, s, eo);
    checks++;
    if (int'(so) != e || ovf != eo) begin
      failures++;
      if (failures < 10) $display("d=%0d x=%0d k=%0d sub=%0b: so=%0d ovf=%0b expected %0d %0b", dd, xx, kk, s, so, ovf, e, eo);
    end
    if (eo) nsat++;
    // idle: the result must hold
    @(negedge clk);
    checks++;
    if (int'(so) != e) begin failures++; $display("result not held"); end
    // exchange: high word {p[33:16]} and low word {p[15:0], 00} trade places
    begin
      logic signed [33:0] p, px;
      int ex; bit exo;
      p = 34'(longint'(xx) * longint'(kk));
      if (s) p = -p;
      px = {p[15:0], 2'b00, p[33:18]};
      ex = finish_so(dd, px, exo);
      xch = 1'b1;
      @(negedge clk);
      xch = 1'b0;
      checks++;
      if (int'(so) != ex || ovf != exo) begin
        failures++;
        if (failures < 10) $display("exchange: so=%0d ovf=%0b expected %0d %0b", so, ovf, ex, exo);
      end
      xch = 1'b1;
      @(negedge clk);
      xch = 1'b0;
      checks++;
      if (int'(so) != e || ovf != eo) begin failures++; $display("second exchange did not restore"); end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    op(0, -32768, -32768, 0);      // +1.0 product: saturates
    op(0, -32768, -32768, 1);
    op(100, 32767, 32767, 0);
    op(-32768, 32767, -32768, 0);
    op(0, 1, 16384, 0);            // 0.5 LSB rounds up
    op(0, -1, 16384, 0);           // -0.5 LSB rounds to 0
    op(1234, 0, -12345, 1);
    for (int i = 0; i < 3000; i++)
      op(int'($signed(16'($urandom))), int'($signed(16'($urandom))), int'($signed(16'($urandom))), 1'($urandom));
    checks++;
    if (nsat == 0) begin failures++; $display("no saturation exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
