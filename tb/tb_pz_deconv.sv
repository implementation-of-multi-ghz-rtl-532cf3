// tb_pz_deconv: self-checking test of pz_deconv with 4 and 16 lanes.
//
// Part one feeds random differences with a random constant M and compares
// r = p * 2^16 + M * d exactly against a sample-by-sample model, at the
// stated latency (accumulator latency + 2: 5 clocks for four lanes, 7 for
// sixteen). Part two feeds a sampled exponential A exp(-n/tau) with M
// matched to tau and checks that the output settles to a step of height
// A (M + 1), which is what the deconvolution is for.
module tb_pz_deconv;

  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned IN_W   = 16;
  localparam int unsigned M_W    = 32;
  localparam int unsigned M_FRAC = 16;
  localparam int unsigned ACC_W  = 64;
  localparam int unsigned NA = 4,  LATA = 5;
  localparam int unsigned NB = 16, LATB = 7;

  logic clk = 1'b0;
  logic rst;
  always #1 clk = ~clk;

  logic signed [IN_W-1:0]  da [NA];
  logic signed [ACC_W-1:0] ra [NA];
  logic signed [IN_W-1:0]  db [NB];
  logic signed [ACC_W-1:0] rb [NB];
  logic [M_W-1:0]          m_coef;

  pz_deconv #(.N(NA), .IN_W(IN_W), .M_W(M_W), .M_FRAC(M_FRAC), .ACC_W(ACC_W))
    dut_a (.clk, .rst, .d(da), .m_coef, .r(ra));
  pz_deconv #(.N(NB), .IN_W(IN_W), .M_W(M_W), .M_FRAC(M_FRAC), .ACC_W(ACC_W))
    dut_b (.clk, .rst, .d(db), .m_coef, .r(rb));

  int checks = 0, failures = 0;
  longint pa, pb;
  longint exp_a [$];
  longint exp_b [$];
  int n_step = 0;

  task automatic do_reset(logic [M_W-1:0] m);
    rst = 1'b1;
    m_coef = m;
    for (int j = 0; j < NA; j++) da[j] = '0;
    for (int j = 0; j < NB; j++) db[j] = '0;
    repeat (3) @(posedge clk);
    #0.1;
    rst = 1'b0;
    pa = 0; pb = 0;
    exp_a.delete(); exp_b.delete();
  endtask

  // One clock; next_a/next_b supply the samples. Returns the lane outputs
  // that matched the expected values (checked here).
  task automatic step(input int sa [NA], input int sb [NB]);
    for (int j = 0; j < NA; j++) begin
      da[j] = IN_W'(sa[j]);
      pa += longint'(da[j]);
      exp_a.push_back((pa <<< M_FRAC) + longint'(da[j]) * longint'({1'b0, m_coef}));
    end
    for (int j = 0; j < NB; j++) begin
      db[j] = IN_W'(sb[j]);
      pb += longint'(db[j]);
      exp_b.push_back((pb <<< M_FRAC) + longint'(db[j]) * longint'({1'b0, m_coef}));
    end
    @(posedge clk);
    #0.1;
    if (exp_a.size() == LATA * NA)
      for (int j = 0; j < NA; j++) begin
        longint e = exp_a.pop_front();
        checks++;
        if (ra[j] !== e) begin
          failures++;
          if (failures < 10) $display("N=4 lane %0d: got %0d expected %0d", j, ra[j], e);
        end
      end
    if (exp_b.size() == LATB * NB)
      for (int j = 0; j < NB; j++) begin
        longint e = exp_b.pop_front();
        checks++;
        if (rb[j] !== e) begin
          failures++;
          if (failures < 10) $display("N=16 lane %0d: got %0d expected %0d", j, rb[j], e);
        end
      end
  endtask

  initial begin
    int sa [NA];
    int sb [NB];
    real tau_s, mreal, amp, height, got;
    // Part one: random data, random M.
    do_reset($urandom);
    for (int c = 0; c < 400; c++) begin
      foreach (sa[j]) sa[j] = int'($signed(IN_W'($urandom)));
      foreach (sb[j]) sb[j] = int'($signed(IN_W'($urandom)));
      step(sa, sb);
    end
    // Part two: exponential with tau = 20 ns at 5 GS/s (100 samples).
    tau_s = 100.0;
    mreal = 1.0 / ($exp(1.0 / tau_s) - 1.0);
    amp   = 4000.0;
    do_reset(M_W'(longint'(mreal * 65536.0 + 0.5)));
    for (int c = 0; c < 200; c++) begin
      foreach (sa[j]) sa[j] = 0;
      foreach (sb[j]) begin
        automatic int n = c * NB + j;
        sb[j] = (n < 16) ? 0 : int'(amp * $exp(-real'(n - 16) / tau_s) + 0.5);
      end
      step(sa, sb);
      if (c > 100) begin
        height = amp * (mreal + 1.0);
        got    = real'(rb[NB-1]) / 65536.0;
        checks++;
        n_step++;
        if (got < 0.99 * height || got > 1.01 * height) begin
          failures++;
          $display("step height %f, expected %f", got, height);
        end
      end
    end
    if (n_step == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
