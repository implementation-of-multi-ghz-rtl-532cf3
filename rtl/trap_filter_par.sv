// trap_filter_par: N-lane parallel trapezoidal shaper for fast exponential
// pulses.
//
// A converter running at N times the logic clock delivers N samples per
// clock (16 lanes of a 5 GS/s stream at 312.5 MHz by default). Every element
// of the classic recursive trapezoidal filter is replicated per lane:
//   d^k(n)     = v(n) - v(n-k)                 delay_sub, rise time k
//   d^{k,l}(n) = d^k(n) - d^k(n-l)             delay_sub, flat top l-k
//   p(n) = p(n-1) + d^{k,l}(n),
//   r(n) = p(n) + M d^{k,l}(n)                 pz_deconv
//   s(n) = s(n-1) + r(n)                       parallel_acc
// An exponential pulse v(n) = A exp(-n Ts / tau) (with M matched to tau)
// becomes a trapezoid that rises over k samples, stays flat for l-k samples
// at height A (M+1) k, and falls over k samples. The accumulators, which in
// a one-sample-per-clock filter are simple feedback registers, use the
// pipelined prefix-sum structure of parallel_acc.
//
// Interface: x[N] signed converter samples, lane 0 oldest; k and l the two
// delays in samples (l >= k for a trapezoid); m_coef the deconvolution
// constant in unsigned fixed point with M_FRAC fraction bits; s[N] the
// shaped output scaled by 2^M_FRAC, wrapping modulo 2^ACC_W. Timing: s for
// word t appears LATENCY clocks after x (2 + 2 + (log2 N + 3) + (log2 N + 1),
// 16 clocks for N = 16). k, l and m_coef are set while rst (synchronous,
// active high) is held; after rst the samples before the first word count as
// zero.
//
// The chain of stages, the per-lane replication, the 14-bit input, the
// 16 lanes and the 64-bit accumulators follow the source description; the
// delay ranges, the fixed-point M, the exact arithmetic and the register
// placement are this design's choices.
module trap_filter_par #(
  parameter int unsigned N      = trap_pkg::LANES_DEF,
  parameter int unsigned X_W    = trap_pkg::SAMPLE_W_DEF,
  parameter int unsigned K_MAX  = trap_pkg::K_MAX_DEF,
  parameter int unsigned L_MAX  = trap_pkg::L_MAX_DEF,
  parameter int unsigned M_W    = trap_pkg::M_W_DEF,
  parameter int unsigned M_FRAC = trap_pkg::M_FRAC_DEF,
  parameter int unsigned ACC_W  = trap_pkg::ACC_W_DEF,
  localparam int unsigned KW    = $clog2(K_MAX + 1),
  localparam int unsigned LWD   = $clog2(L_MAX + 1)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [X_W-1:0]   x [N],
  input  logic        [KW-1:0]    k,
  input  logic        [LWD-1:0]   l,
  input  logic        [M_W-1:0]   m_coef,
  output logic signed [ACC_W-1:0] s [N]
);

  logic signed [X_W:0]     dk  [N];
  logic signed [X_W+1:0]   dkl [N];
  logic signed [ACC_W-1:0] r   [N];

  // Rise-time stage (RS1).
  delay_sub #(.N(N), .W(X_W), .D_MAX(K_MAX)) u_rs1 (
    .clk (clk), .rst (rst), .x (x), .dly (k), .d (dk)
  );

  // Flat-top stage (RS2).
  delay_sub #(.N(N), .W(X_W + 1), .D_MAX(L_MAX)) u_rs2 (
    .clk (clk), .rst (rst), .x (dk), .dly (l), .d (dkl)
  );

  // Pole-zero deconvolution (DEC).
  pz_deconv #(.N(N), .IN_W(X_W + 2), .M_W(M_W), .M_FRAC(M_FRAC), .ACC_W(ACC_W)) u_dec (
    .clk (clk), .rst (rst), .d (dkl), .m_coef (m_coef), .r (r)
  );

  // Final accumulator that integrates the step into the trapezoid.
  parallel_acc #(.N(N), .IN_W(ACC_W), .ACC_W(ACC_W)) u_acc (
    .clk (clk), .rst (rst), .x (r), .y (s)
  );

endmodule
