// tb_trap_filter_par: end-to-end test of the parallel trapezoidal shaper at
// its default size (16 lanes, 14-bit samples, 64-bit accumulators).
//
// For several settings of rise time k, flat-top delay l and decay constant
// tau (with M = 1/(exp(1/tau)-1) in 16-fraction-bit fixed point), the
// testbench synthesises a stream of exponential pulses with random
// amplitude, random arrival phase (pulses start between samples) and small
// noise, some of them piled up. A one-sample-per-clock model of the
// recursive filter (two delay-subtract stages, accumulator, multiply-add,
// accumulator) computes the expected output, and every output lane is
// compared exactly, 16 clocks after its input word. Independently of that
// model, the testbench checks the shape the filter exists to produce: for
// every isolated pulse the flat top lies within 1 % of A_s (M+1) k (A_s the
// first sample of the pulse), and the output is back near zero once the
// trapezoid has ended.
//
// Counted events, each required at least once: delays that rotate lanes,
// whole-word delays, delays shorter than one word, piled-up pulses,
// flat tops measured, returns to baseline measured.
module tb_trap_filter_par;

  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned N       = 16;
  localparam int unsigned X_W     = 14;
  localparam int unsigned LATENCY = 16;
  localparam int unsigned M_FRAC  = 16;

  logic clk = 1'b0;
  logic rst;
  always #1 clk = ~clk;

  logic signed [X_W-1:0] x [N];
  logic [9:0]            k, l;
  logic [31:0]           m_coef;
  logic signed [63:0]    s [N];

  trap_filter_par dut (.clk, .rst, .x, .k, .l, .m_coef, .s);

  int checks = 0, failures = 0;
  int n_rot = 0, n_whole = 0, n_short = 0, n_pile = 0, n_flat = 0, n_base = 0;

  // Golden model state.
  int     v_hist  [$];
  int     dk_hist [$];
  longint p_m, s_m;
  longint exp_q [$];
  longint out_all [$];     // every RTL output sample of the current run

  function automatic longint golden(int v, int kk, int ll, longint m);
    int n = v_hist.size();
    int dk, dkl;
    v_hist.push_back(v);
    dk = v - ((n - kk >= 0) ? v_hist[n - kk] : 0);
    dk_hist.push_back(dk);
    dkl = dk - ((n - ll >= 0) ? dk_hist[n - ll] : 0);
    p_m += longint'(dkl);
    s_m += (p_m <<< M_FRAC) + longint'(dkl) * m;
    return s_m;
  endfunction

  task automatic run_config(int kk, int ll, real tau, int npulse);
    real    mreal, t0 [$], amp [$];
    real    t, a, vr;
    longint m;
    int     nsamp, nwords, v;
    int     n0, top_n, base_n;
    real    a_s, height, got, tol;
    bit     iso;

    mreal = 1.0 / ($exp(1.0 / tau) - 1.0);
    m = longint'(mreal * 65536.0 + 0.5);
    if (kk % N != 0 || ll % N != 0) n_rot++;
    if (kk % N == 0 || ll % N == 0) n_whole++;
    if (kk < N || ll < N) n_short++;

    // Pulse schedule.
    t = 40.0;
    for (int i = 0; i < npulse; i++) begin
      t0.push_back(t);
      amp.push_back(real'($urandom_range(3000, 500)));
      if ($urandom_range(3) == 0) begin
        t = t + real'($urandom_range(kk + ll - 1, 3)) + real'($urandom_range(999)) / 1000.0;
        n_pile++;
      end else begin
        t = t + real'($urandom_range(3 * (kk + ll), kk + ll + 20)) + real'($urandom_range(999)) / 1000.0;
      end
    end
    nsamp  = int'(t) + 2 * (kk + ll);
    nwords = (nsamp + N - 1) / N;

    // Reset with the new settings.
    rst = 1'b1;
    k = 10'(kk);
    l = 10'(ll);
    m_coef = 32'(m);
    foreach (x[j]) x[j] = '0;
    repeat (3) @(posedge clk);
    #0.1;
    rst = 1'b0;
    v_hist.delete(); dk_hist.delete(); exp_q.delete(); out_all.delete();
    p_m = 0; s_m = 0;

    for (int w = 0; w < nwords + LATENCY; w++) begin
      for (int j = 0; j < N; j++) begin
        int n = w * N + j;
        vr = 0.0;
        for (int i = 0; i < t0.size(); i++)
          if (real'(n) >= t0[i]) vr += amp[i] * $exp(-(real'(n) - t0[i]) / tau);
        v = int'(vr + 0.5) + $urandom_range(2) - 1;
        if (v > 8191) v = 8191;
        if (v < -8192) v = -8192;
        x[j] = X_W'(v);
        exp_q.push_back(golden(v, kk, ll, m));
      end
      @(posedge clk);
      #0.1;
      if (exp_q.size() == LATENCY * N)
        for (int j = 0; j < N; j++) begin
          longint e = exp_q.pop_front();
          out_all.push_back(s[j]);
          checks++;
          if (s[j] !== e) begin
            failures++;
            if (failures < 10) $display("k=%0d l=%0d sample %0d: got %0d expected %0d",
                                        kk, ll, out_all.size() - 1, s[j], e);
          end
        end
    end

    // Shape checks on isolated pulses.
    for (int i = 0; i < t0.size(); i++) begin
      iso = 1'b1;
      for (int q = 0; q < t0.size(); q++)
        if (q != i && t0[q] > t0[i] - real'(kk + ll + 2) && t0[q] < t0[i] + real'(kk + ll + 4))
          iso = 1'b0;
      if (!iso) continue;
      n0     = int'($ceil(t0[i]));
      a_s    = amp[i] * $exp(-(real'(n0) - t0[i]) / tau);
      height = a_s * (mreal + 1.0) * real'(kk);
      tol    = 0.01 * height;
      top_n  = n0 + (kk + ll) / 2;
      base_n = n0 + kk + ll + 1;
      if (ll > kk && base_n < out_all.size()) begin
        got = real'(out_all[top_n]) / 65536.0;
        checks++;
        n_flat++;
        if (got < height - tol || got > height + tol) begin
          failures++;
          $display("k=%0d l=%0d flat top %f, expected %f", kk, ll, got, height);
        end
        got = real'(out_all[base_n]) / 65536.0;
        checks++;
        n_base++;
        if (got < -tol || got > tol) begin
          failures++;
          $display("k=%0d l=%0d after pulse %f, expected about 0", kk, ll, got);
        end
      end
    end
  endtask

  initial begin
    // 30 ns shaping at 5 GS/s, tau = 20 ns.
    run_config(150, 200, 100.0, 12);
    // Short filter: both delays below one word.
    run_config(7, 12, 50.0, 12);
    // Whole-word delays.
    run_config(32, 48, 100.0, 12);
    // Lane-rotating delays, tau = 10 ns.
    run_config(50, 75, 50.0, 12);
    $display("events: rotated %0d whole-word %0d short %0d pile-up %0d flat-top %0d baseline %0d",
             n_rot, n_whole, n_short, n_pile, n_flat, n_base);
    if (n_rot == 0)   begin failures++; $display("no lane-rotating delay"); end
    if (n_whole == 0) begin failures++; $display("no whole-word delay"); end
    if (n_short == 0) begin failures++; $display("no delay under one word"); end
    if (n_pile == 0)  begin failures++; $display("no pile-up"); end
    if (n_flat == 0)  begin failures++; $display("no flat top measured"); end
    if (n_base == 0)  begin failures++; $display("no baseline return measured"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
