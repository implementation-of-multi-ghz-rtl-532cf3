// tb_rate_run: one sample-rate leg of the sample-rate comparison test.
//
// Runs a trap_filter_par built with N lanes on pulses sampled every TS_PS
// picoseconds: 30 ns rise time, 10 ns flat top, 20 ns preamplifier decay.
// Each pulse has a random amplitude and a random arrival time between two
// samples. Every output lane is compared exactly against a sample-by-sample
// model of the recursive filter; for each pulse the flat top is divided by
// A (M+1) k, the value it would have if the pulse peak fell on a sample, and
// the spread (max - min) of that ratio is reported in parts per million.
// It must stay within the bound Ts/tau set by the random arrival phase.
module tb_rate_run #(
  parameter int unsigned N     = 16,
  parameter int unsigned TS_PS = 200
) (
  output logic done,
  output int   checks,
  output int   failures,
  output int   spread_ppm,
  output int   pulses
);

  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned LATENCY = 2 * 2 + 2 * ($clog2(N) + 1) + 2;
  localparam real TS   = real'(TS_PS) / 1000.0;      // ns
  localparam real TAU  = 20.0 / TS;                  // samples
  localparam int  KK   = int'(30.0 / TS);
  localparam int  LL   = int'(40.0 / TS);
  localparam int  NPULSE = 40;

  logic clk = 1'b0;
  logic rst;
  always #1 clk = ~clk;

  logic signed [13:0] x [N];
  logic [9:0]         k, l;
  logic [31:0]        m_coef;
  logic signed [63:0] s [N];

  trap_filter_par #(.N(N)) dut (.clk, .rst, .x, .k, .l, .m_coef, .s);

  int     v_hist  [$];
  int     dk_hist [$];
  longint exp_q   [$];
  longint out_all [$];
  longint p_m, s_m;

  function automatic longint golden(int v, longint m);
    int n = v_hist.size();
    int dk, dkl;
    v_hist.push_back(v);
    dk = v - ((n - KK >= 0) ? v_hist[n - KK] : 0);
    dk_hist.push_back(dk);
    dkl = dk - ((n - LL >= 0) ? dk_hist[n - LL] : 0);
    p_m += longint'(dkl);
    s_m += (p_m <<< 16) + longint'(dkl) * m;
    return s_m;
  endfunction

  initial begin
    real    mreal, t0 [$], amp [$], t, vr, ratio, rmin, rmax;
    longint m;
    int     nsamp, nwords, v, top_n;

    done = 1'b0; checks = 0; failures = 0; spread_ppm = 0; pulses = 0;
    mreal = 1.0 / ($exp(1.0 / TAU) - 1.0);
    m = longint'(mreal * 65536.0 + 0.5);
    t = 10.0;
    for (int i = 0; i < NPULSE; i++) begin
      t0.push_back(t);
      amp.push_back(real'($urandom_range(6000, 2000)));
      t = t + real'(KK + LL + 2) + real'($urandom_range(5 * KK)) + real'($urandom_range(999)) / 1000.0;
    end
    nsamp  = int'(t) + KK + LL;
    nwords = (nsamp + N - 1) / N;

    rst = 1'b1;
    k = 10'(KK);
    l = 10'(LL);
    m_coef = 32'(m);
    foreach (x[j]) x[j] = '0;
    repeat (3) @(posedge clk);
    #0.1;
    rst = 1'b0;
    p_m = 0; s_m = 0;

    for (int w = 0; w < nwords + LATENCY; w++) begin
      for (int j = 0; j < N; j++) begin
        automatic int n = w * N + j;
        vr = 0.0;
        for (int i = 0; i < t0.size(); i++)
          if (real'(n) >= t0[i]) vr += amp[i] * $exp(-(real'(n) - t0[i]) / TAU);
        v = int'(vr + 0.5);
        if (v > 8191) v = 8191;
        x[j] = 14'(v);
        exp_q.push_back(golden(v, m));
      end
      @(posedge clk);
      #0.1;
      if (exp_q.size() == LATENCY * N)
        for (int j = 0; j < N; j++) begin
          automatic longint e = exp_q.pop_front();
          out_all.push_back(s[j]);
          checks++;
          if (s[j] !== e) begin
            failures++;
            if (failures < 5) $display("N=%0d: got %0d expected %0d", N, s[j], e);
          end
        end
    end

    rmin = 1.0e9;
    rmax = -1.0e9;
    for (int i = 0; i < t0.size(); i++) begin
      top_n = int'($ceil(t0[i])) + (KK + LL) / 2;
      if (top_n >= out_all.size()) continue;
      ratio = real'(out_all[top_n]) / 65536.0 / (amp[i] * (mreal + 1.0) * real'(KK));
      if (ratio < rmin) rmin = ratio;
      if (ratio > rmax) rmax = ratio;
      pulses++;
      // Phase error bound: the first sample lies at most one period after
      // the peak, so the ratio is between exp(-1/tau) and 1 (plus rounding).
      checks++;
      if (ratio > 1.002 || ratio < $exp(-1.0 / TAU) - 0.002) begin
        failures++;
        $display("N=%0d: flat-top ratio %f outside [%f, 1]", N, ratio, $exp(-1.0 / TAU));
      end
    end
    spread_ppm = int'((rmax - rmin) * 1.0e6);
    done = 1'b1;
  end

endmodule
