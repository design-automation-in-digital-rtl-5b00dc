// tb_imt_lp_top: end-to-end test of the whole design at its default
// parameters (no parameter overrides): both filters run at the same time.
//
// Lattice FIR-IIR filter: a sample is offered every cycle and taken every 144
// clocks; an integer model of the lattice recursions predicts each output,
// and the latency of 144 clocks is checked.  Stimulus: impulse, small random,
// full-scale random (IIR saturation), square wave.
// Direct-form FIR filter: samples are offered with random gaps and while the
// filter is busy (so the handshake stalls the source); an integer model of
// the tap-by-tap rounded sum predicts each output and its saturation flag,
// and the latency of 72 clocks is checked.
// Mechanisms counted, each must occur: lattice outputs, lattice saturations,
// FIR outputs, FIR saturations, FIR input stalls (in_valid while not ready).
// The clock runs at the hearing-aid operating point, 2.304 MHz (period
// 434.028 ns), and the time between lattice outputs is checked to be one
// 16 kHz sample period, 62.5 us.
module tb_imt_lp_top;
  import lattice_pkg::*;
  import imt_fir_pkg::TAPS, imt_fir_pkg::FIR_COEFS;

  localparam int PERIOD = SLOTS * SLOT_CYCLES;   // 144
  localparam int NLAT   = 300;
  localparam int NFIR   = 500;

  logic    clk = 1'b0, rst_n = 1'b0;
  sample_t lat_din, lat_dout, fir_din, fir_dout;
  logic    lat_in_take, lat_out_valid, lat_sat;
  logic    fir_in_valid, fir_in_ready, fir_out_valid, fir_sat;

  imt_lp_top dut (.*);

  localparam realtime HALF_CLK = 217.014ns;    // 1 / (2 * 2.304 MHz)
  localparam realtime T_SAMPLE = 62.5us;       // 1 / 16 kHz
  always #HALF_CLK clk = ~clk;
  realtime last_out_t = 0;

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat ((NLAT + 5) * PERIOD + 1000) @(posedge clk);
    failures++;
    $display("watchdog: lattice %0d/%0d, fir %0d/%0d outputs", lat_out, NLAT, fir_out, NFIR);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- lattice model ----------------
  int k_tab [SLOTS];
  int g [ORDER], gg [ORDER];
  int lat_model_sat = 0;

  function automatic int mop(input int d, input int x, input int kk, input bit sub);
    longint p, v;
    p = longint'(x) * longint'(kk);
    if (sub) p = -p;
    v = longint'(d) + ((p + 16384) >>> 15);
    if (v > 32767)  begin v = 32767;  lat_model_sat++; end
    if (v < -32768) begin v = -32768; lat_model_sat++; end
    return int'(v);
  endfunction

  function automatic int lattice_step(input int x);
    int f, gn [ORDER], gnn [ORDER];
    f = x; gn[0] = x;
    for (int i = 0; i < ORDER; i++) begin
      int fn;
      fn = mop(f, g[i], k_tab[i], 1'b0);
      if (i < ORDER - 1) gn[i+1] = mop(g[i], f, k_tab[i], 1'b0);
      f = fn;
    end
    for (int q = 0; q < ORDER; q++) begin
      int p, fn;
      p  = ORDER - 1 - q;
      fn = mop(f, gg[p], k_tab[ORDER + q], 1'b1);
      if (p < ORDER - 1) gnn[p+1] = mop(gg[p], fn, k_tab[ORDER + q], 1'b0);
      f = fn;
    end
    gnn[0] = f;
    g = gn; gg = gnn;
    return f;
  endfunction

  function automatic sample_t lat_stim(input int n);
    if (n == 1)  return 16'sd16384;
    if (n < 40)  return '0;
    if (n < 120) return sample_t'($urandom_range(0, 8191)) - 16'sd4096;
    if (n < 220) return sample_t'($urandom);
    return ((n / 8) % 2 != 0) ? 16'sd20000 : -16'sd20000;
  endfunction

  // ---------------- FIR model ----------------
  int hist [TAPS];
  int fir_exp [$], fir_exp_sat [$], fir_acc_cycle [$];

  function automatic void fir_model(input int x);
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
    fir_exp.push_back(s);
    fir_exp_sat.push_back(int'(st));
  endfunction

  function automatic sample_t fir_stim(input int n);
    if (n == 0)  return 16'sd32767;
    if (n < 12)  return '0;
    if (n < 300) return sample_t'($urandom);
    if (n < 330) return 16'sd32767;
    if (n < 360) return -16'sd32768;
    return sample_t'($urandom_range(0, 3000));
  endfunction

  // ---------------- drive ----------------
  int lat_in = 0, lat_out = 0, lat_sat_n = 0;
  int lat_exp [$], lat_take_cycle [$];
  int fir_in = 0, fir_out = 0, fir_sat_n = 0, fir_stalls = 0;

  initial begin
    for (int i = 0; i < SLOTS; i++) k_tab[i] = int'(DEFAULT_COEFS[i]);
    for (int i = 0; i < ORDER; i++) begin g[i] = 0; gg[i] = 0; end
    for (int i = 0; i < TAPS; i++) hist[i] = 0;
    lat_exp.push_back(lattice_step(0));      // the period after reset filters zero
    lat_din = '0; fir_din = '0; fir_in_valid = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
  end

  always @(negedge clk) begin
    lat_din <= lat_stim(lat_in + 1);
    if (fir_in < NFIR) begin
      fir_in_valid <= ($urandom_range(0, 4) != 0);
      fir_din      <= fir_stim(fir_in);
    end else fir_in_valid <= 1'b0;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      // lattice
      if (lat_in_take) begin
        lat_in++;
        lat_exp.push_back(lattice_step(int'(lat_din)));
        lat_take_cycle.push_back(cycle);
      end
      if (lat_sat) lat_sat_n++;
      if (lat_out_valid && lat_out < NLAT) begin
        int e;
        lat_out++;
        e = lat_exp.pop_front();
        checks++;
        if (int'(lat_dout) != e) begin
          failures++;
          if (failures < 20) $display("lattice output %0d: got %0d expected %0d", lat_out, lat_dout, e);
        end
        if (lat_out >= 2) begin
          int tc;
          checks++;
          if ($realtime - last_out_t < T_SAMPLE - 0.01us || $realtime - last_out_t > T_SAMPLE + 0.01us) begin
            failures++;
            $display("lattice output spacing %0.4f us, expected 62.5 us", ($realtime - last_out_t) / 1us);
          end
          tc = lat_take_cycle.pop_front();
          checks++;
          if (cycle - tc != PERIOD + 1) begin failures++; $display("lattice latency %0d", cycle - tc - 1); end
        end
        last_out_t = $realtime;
      end
      // FIR
      if (fir_in_valid && !fir_in_ready) fir_stalls++;
      if (fir_in_valid && fir_in_ready) begin
        fir_model(int'(fir_din));
        fir_acc_cycle.push_back(cycle);
        fir_in++;
      end
      if (fir_out_valid) begin
        int e, es, ac;
        e = fir_exp.pop_front(); es = fir_exp_sat.pop_front(); ac = fir_acc_cycle.pop_front();
        fir_out++;
        checks++;
        if (int'(fir_dout) != e || int'(fir_sat) != es) begin
          failures++;
          if (failures < 20) $display("fir output %0d: %0d sat=%b, expected %0d sat=%0d", fir_out, fir_dout, fir_sat, e, es);
        end
        checks++;
        if (cycle - ac != 9 * TAPS + 1) begin failures++; $display("fir latency %0d", cycle - ac - 1); end
        if (fir_sat) fir_sat_n++;
      end
      if (lat_out == NLAT && fir_out == NFIR) finish_test();
    end
  end

  task automatic finish_test();
    checks++;
    if (lat_sat_n == 0 || lat_model_sat == 0) begin failures++; $display("lattice saturation never happened"); end
    checks++;
    if (fir_sat_n == 0) begin failures++; $display("FIR saturation never happened"); end
    checks++;
    if (fir_stalls == 0) begin failures++; $display("FIR input never stalled"); end
    $display("lattice: outputs=%0d saturation pulses=%0d; fir: outputs=%0d saturated=%0d stalls=%0d",
             lat_out, lat_sat_n, fir_out, fir_sat_n, fir_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

endmodule
