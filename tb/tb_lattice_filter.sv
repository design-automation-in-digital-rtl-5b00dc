// tb_lattice_filter: end-to-end test of the lattice FIR-IIR filter at its
// default parameters (default coefficient table, 16-bit data).
//
// A behavioural model computes the same lattice recursions sample by sample
// in plain integer arithmetic (each operation: d +/- round(k*x / 2^15),
// saturated to 16 bits), independently of the RTL's slot schedule.  The test
// feeds an impulse, small random samples, full-scale random samples (which
// drive the IIR section into saturation) and a square wave, compares every
// output word, checks that each input is answered exactly 144 clocks after it
// was captured and that a new sample is taken every 144 clocks, and compares
// the number of saturated MAC results with the model's count.
// Mechanisms counted: outputs, saturations, outputs rounded in the model's
// last operation upward (rounding), nonzero IIR feedback (G state != 0).
module tb_lattice_filter;
  import lattice_pkg::*;

  localparam int PERIOD  = SLOTS * SLOT_CYCLES;   // 144
  localparam int NSAMP   = 400;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  sample_t din;
  logic    in_take, out_valid, sat;
  sample_t dout;

  lattice_filter dut (.clk, .rst_n, .din, .in_take, .dout, .out_valid, .sat);

  // a second filter with large coefficients of both signs, including -1.0,
  // built with the matrix (standard-cell) ROM
  localparam coef_table_t COEFS2 = '{
    -16'sd32768, 16'sd32767, -16'sd30000, 16'sd25000, -16'sd20000, 16'sd12345, -16'sd1, 16'sd1,
    16'sd30000, -16'sd29000, 16'sd20000, -16'sd32768, 16'sd16384, -16'sd8192, 16'sd3, -16'sd31000};
  logic    in_take2, out_valid2, sat2;
  sample_t dout2;
  lattice_filter #(.COEFS(COEFS2), .ASIC_STYLE(1'b1)) dut2 (.clk, .rst_n, .din, .in_take(in_take2), .dout(dout2),
                                         .out_valid(out_valid2), .sat(sat2));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // watchdog
  initial begin
    repeat ((NSAMP + 5) * PERIOD + 100) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  int k_tab [SLOTS], k_tab2 [SLOTS];
  int g [ORDER];      // FIR delayed states g_0..g_7 (n-1)
  int gg [ORDER];     // IIR delayed states G_0..G_7 (n-1)
  int g2 [ORDER], gg2 [ORDER];   // the same for the second filter
  int exp2_q [$];
  int dummy_sat = 0, dummy_round = 0;
  int model_sat = 0;
  int model_round_up = 0;

  function automatic int sat16(input longint v, inout int nsat);
    if (v > 32767)  begin nsat++; return 32767; end
    if (v < -32768) begin nsat++; return -32768; end
    return int'(v);
  endfunction

  function automatic int mop(input int d, input int x, input int kk, input bit sub, inout int nsat);
    longint p, r;
    p = longint'(x) * longint'(kk);
    if (sub) p = -p;
    r = (p + 16384) >>> 15;
    return sat16(longint'(d) + r, nsat);
  endfunction

  function automatic int model_step(input int x);
    int f, ff, gn [ORDER], gnn [ORDER];
    f = x; gn[0] = x;
    for (int i = 0; i < ORDER; i++) begin
      int fn;
      fn = mop(f, g[i], k_tab[i], 1'b0, model_sat);
      if (i < ORDER - 1) gn[i+1] = mop(g[i], f, k_tab[i], 1'b0, model_sat);
      f = fn;
    end
    ff = f;
    for (int q = 0; q < ORDER; q++) begin
      int p, kk, fn;
      p  = ORDER - 1 - q;
      kk = k_tab[ORDER + q];
      fn = mop(ff, gg[p], kk, 1'b1, model_sat);
      if (p < ORDER - 1) gnn[p+1] = mop(gg[p], fn, kk, 1'b0, model_sat);
      if (q == ORDER - 1 && ((longint'(gg[p]) * kk) & 16384) != 0) model_round_up++;
      ff = fn;
    end
    gnn[0] = ff;
    g = gn; gg = gnn;
    return ff;
  endfunction

  // same recursions for the second coefficient table
  function automatic int model_step2(input int x);
    int f, ff, gn [ORDER], gnn [ORDER];
    f = x; gn[0] = x;
    for (int i = 0; i < ORDER; i++) begin
      int fn;
      fn = mop(f, g2[i], k_tab2[i], 1'b0, dummy_sat);
      if (i < ORDER - 1) gn[i+1] = mop(g2[i], f, k_tab2[i], 1'b0, dummy_sat);
      f = fn;
    end
    ff = f;
    for (int q = 0; q < ORDER; q++) begin
      int p, fn;
      p  = ORDER - 1 - q;
      fn = mop(ff, gg2[p], k_tab2[ORDER + q], 1'b1, dummy_sat);
      if (p < ORDER - 1) gnn[p+1] = mop(gg2[p], fn, k_tab2[ORDER + q], 1'b0, dummy_sat);
      ff = fn;
    end
    gnn[0] = ff;
    g2 = gn; gg2 = gnn;
    return ff;
  endfunction

  // ---------------- stimulus ----------------
  function automatic sample_t stim(input int n);
    if (n == 1)   return 16'sd16384;                      // impulse
    if (n < 40)   return '0;
    if (n < 150)  return sample_t'($urandom_range(0, 8191)) - 16'sd4096;  // small
    if (n < 260)  return sample_t'($urandom);             // full scale
    return ((n / 8) % 2 != 0) ? 16'sd20000 : -16'sd20000;       // square wave
  endfunction

  int in_cnt = 0, out_cnt = 0;
  int take_cycle [$];
  int last_take = -1;
  int exp_q [$];
  int sat_pulses = 0, nonzero_out = 0, iir_state_seen = 0;

  initial begin
    for (int i = 0; i < SLOTS; i++) k_tab[i] = int'(DEFAULT_COEFS[i]);
    for (int i = 0; i < SLOTS; i++) k_tab2[i] = int'(COEFS2[i]);
    for (int i = 0; i < ORDER; i++) begin g[i] = 0; gg[i] = 0; g2[i] = 0; gg2[i] = 0; end
    // the period right after reset filters a zero sample
    exp_q.push_back(model_step(0));
    exp2_q.push_back(model_step2(0));
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
  end


  always @(posedge clk) begin
    if (rst_n) begin
      if (in_take) begin
        in_cnt++;
        exp_q.push_back(model_step(int'(din)));
        exp2_q.push_back(model_step2(int'(din)));
        take_cycle.push_back(cycle);
        if (last_take >= 0) begin
          checks++;
          if (cycle - last_take != PERIOD) begin
            failures++;
            $display("sample rate: inputs %0d clocks apart, expected %0d", cycle - last_take, PERIOD);
          end
        end
        last_take = cycle;
      end
      if (sat) sat_pulses++;
      if (out_valid) begin
        int e;
        out_cnt++;
        e = exp_q.pop_front();
        checks++;
        if (int'(dout) != e) begin
          failures++;
          if (failures < 20) $display("output %0d: got %0d expected %0d", out_cnt, dout, e);
        end
        if (dout != 0) nonzero_out++;
        // the second filter runs in lock step with the first
        begin
          int e2;
          e2 = exp2_q.pop_front();
          checks++;
          if (!out_valid2 || int'(dout2) != e2) begin
            failures++;
            if (failures < 20) $display("filter 2 output %0d: got %0d (valid %b) expected %0d", out_cnt, dout2, out_valid2, e2);
          end
        end
        if (gg[1] != 0) iir_state_seen++;
        // output k (k>=2) answers input k-1; out_valid comes the cycle after the update
        if (out_cnt >= 2) begin
          int tc;
          tc = take_cycle.pop_front();
          checks++;
          if (cycle - tc != PERIOD + 1) begin
            failures++;
            $display("latency: %0d clocks, expected %0d", cycle - tc - 1, PERIOD);
          end
        end
        if (out_cnt == NSAMP) finish_test();
      end
    end
  end

  // the next sample is presented on the falling edge, away from the sampling edge
  initial din = '0;
  always @(negedge clk) din <= stim(in_cnt + 1);

  task automatic finish_test();
    // the saturation pulses of the last period may still be due; compare
    // after the whole pipeline has drained past the last compared output
    repeat (2) @(posedge clk);
    checks++;
    if (sat_pulses == 0 || model_sat == 0) begin
      failures++; $display("saturation never happened");
    end
    // pulses of two results stored in the same cycle merge into one
    checks++;
    if (sat_pulses > model_sat || sat_pulses < model_sat / 2) begin
      failures++; $display("saturation pulses %0d do not fit the model's %0d", sat_pulses, model_sat);
    end
    checks++;
    if (nonzero_out < NSAMP / 2) begin
      failures++; $display("too few nonzero outputs: %0d", nonzero_out);
    end
    checks++;
    if (model_round_up == 0) begin
      failures++; $display("rounding never rounded up");
    end
    checks++;
    if (iir_state_seen == 0) begin
      failures++; $display("IIR feedback state never nonzero");
    end
    $display("outputs=%0d saturation pulses=%0d (model %0d saturated ops incl. unfinished period) round-ups=%0d iir-state-nonzero=%0d",
             out_cnt, sat_pulses, model_sat, model_round_up, iir_state_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

endmodule
