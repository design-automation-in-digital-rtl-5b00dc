// tb_imt_fir: end-to-end test of the direct-form FIR filter.
// An integer model (s = sat16(s + ((a_i*x(n-i) + 2^14) >> 15)) over the taps)
// predicts every output; the test also checks the 9*TAPS-clock latency, that
// in_ready returns together with out_valid, and that saturation of a
// partial sum is flagged.  Samples: impulse (reads out the coefficients),
// random, full-scale DC (saturates), and gaps in in_valid.  A second instance
// with the matrix (standard-cell) RAM and ROM runs on the same stimulus and
// must match the first in every cycle.
module tb_imt_fir;
  import imt_fir_pkg::*;
  localparam int NSAMP = 300;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, in_ready, out_valid, sat;
  logic signed [15:0] din = '0, dout;

  imt_fir dut (.clk, .rst_n, .din, .in_valid, .in_ready, .dout, .out_valid, .sat);

  logic in_ready_a, out_valid_a, sat_a;
  logic signed [15:0] dout_a;
  imt_fir #(.ASIC_STYLE(1'b1)) dut_a (.clk, .rst_n, .din, .in_valid, .in_ready(in_ready_a),
                                     .dout(dout_a), .out_valid(out_valid_a), .sat(sat_a));
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0, nsat = 0, msat = 0;
  int hist [TAPS];
  int exp_q [$], exp_sat [$], acc_cycle [$];
  always @(posedge clk) cycle <= cycle + 1;

  // the matrix version must track the behavioural one cycle by cycle
  always @(negedge clk) if (rst_n) begin
    checks++;
    if ({in_ready_a, out_valid_a, sat_a, dout_a} !== {in_ready, out_valid, sat, dout}) begin
      failures++;
      if (failures < 10) $display("matrix version differs at cycle %0d", cycle);
    end
  end

  initial begin
    repeat (NSAMP * 9 * TAPS * 2 + 1000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void model(input int x);
    int s; bit st;
    for (int i = TAPS - 1; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = x;
    s = 0; st = 0;
    for (int i = 0; i < TAPS; i++) begin
      longint v;
      v = longint'(s) + ((longint'(FIR_COEFS[i]) * hist[i] + 16384) >>> 15);
      if (v > 32767)  begin v = 32767;  st = 1; end
      if (v < -32768) begin v = -32768; st = 1; end
      s = int'(v);
    end
    exp_q.push_back(s);
    exp_sat.push_back(int'(st));
  endfunction

  function automatic logic signed [15:0] stim(input int n);
    if (n == 0) return 16'sd32767;
    if (n < 12) return '0;
    if (n < 200) return 16'($urandom);
    if (n < 230) return 16'sd32767;
    if (n < 260) return -16'sd32768;
    return 16'($urandom_range(0, 2000));
  endfunction

  int sent = 0, got = 0;
  initial begin
    for (int i = 0; i < TAPS; i++) hist[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    while (sent < NSAMP) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      din = stim(sent);
    end
    @(negedge clk) in_valid = 1'b0;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && in_ready) begin
        model(int'(din));
        acc_cycle.push_back(cycle);
        sent++;
      end
      if (!in_ready && in_valid && acc_cycle.size() == 0) begin
        failures++; $display("in_ready low while idle");
      end
      if (out_valid) begin
        int e, es, ac;
        e = exp_q.pop_front(); es = exp_sat.pop_front(); ac = acc_cycle.pop_front();
        got++;
        checks++;
        if (int'(dout) != e || int'(sat) != es) begin
          failures++;
          if (failures < 10) $display("out %0d: %0d sat=%b, expected %0d sat=%0d", got, dout, sat, e, es);
        end
        checks++;
        if (cycle - ac != 9 * TAPS + 1) begin
          failures++; $display("latency %0d", cycle - ac - 1);
        end
        checks++;
        if (!in_ready) begin failures++; $display("in_ready not back with the output"); end
        if (sat) nsat++;
        msat += es;
        if (got == NSAMP) begin
          checks++;
          if (nsat == 0) begin failures++; $display("saturation never happened"); end
          $display("outputs=%0d saturated=%0d", got, nsat);
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end
endmodule
