// pz_deconv: parallel deconvolution of an exponential pulse into a step.
//
// For a preamplifier pulse that decays as exp(-t/tau) sampled every Ts, the
// recursion
//     p(n) = p(n-1) + d(n)          (parallel_acc)
//     r(n) = p(n)   + M * d(n),     M = 1 / (exp(Ts/tau) - 1)
// turns each exponential into a step of height A*(M+1). The accumulator is
// the N-lane parallel_acc; the multiplier and the adder are replicated N
// times, and d is delayed by the accumulator latency so that both adder
// inputs belong to the same sample.
//
// Interface: d[N] input differences (IN_W bits, signed), m_coef the constant
// M as an unsigned fixed-point number with M_FRAC fraction bits, r[N] the
// result. To keep the arithmetic exact, r is returned scaled by 2^M_FRAC:
// r = p * 2^M_FRAC + m_coef * d. All arithmetic wraps modulo 2^ACC_W.
// Timing: r for word t appears pacc_latency(N) + 2 clocks after d (one
// register after the multiplier, one after the adder). m_coef should be held
// constant while the filter runs; rst (synchronous, active high) clears the
// accumulator and the pipeline.
//
// The structure (accumulator, multiplier by M, adder) and the formula for M
// follow the source description; the fixed-point format of M and the
// pipeline registers are this design's choices.
module pz_deconv #(
  parameter int unsigned N      = trap_pkg::LANES_DEF,
  parameter int unsigned IN_W   = trap_pkg::SAMPLE_W_DEF + 2,
  parameter int unsigned M_W    = trap_pkg::M_W_DEF,
  parameter int unsigned M_FRAC = trap_pkg::M_FRAC_DEF,
  parameter int unsigned ACC_W  = trap_pkg::ACC_W_DEF
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [IN_W-1:0]  d [N],
  input  logic        [M_W-1:0]   m_coef,
  output logic signed [ACC_W-1:0] r [N]
);

  localparam int unsigned LA = trap_pkg::pacc_latency(N);

  logic signed [ACC_W-1:0] p [N];

  parallel_acc #(.N(N), .IN_W(IN_W), .ACC_W(ACC_W)) u_acc (
    .clk (clk),
    .rst (rst),
    .x   (d),
    .y   (p)
  );

  // Delay line that aligns d with the accumulator output.
  logic signed [IN_W-1:0] d_dly [LA+1][N];

  always_comb d_dly[0] = d;

  for (genvar s = 0; s < LA; s++) begin : g_dly
    always_ff @(posedge clk) begin
      if (rst) for (int j = 0; j < N; j++) d_dly[s+1][j] <= '0;
      else     d_dly[s+1] <= d_dly[s];
    end
  end

  // Multiply and add, one register each.
  logic signed [ACC_W-1:0] prod_r [N];
  logic signed [ACC_W-1:0] p_r    [N];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int j = 0; j < N; j++) begin
        prod_r[j] <= '0;
        p_r[j]    <= '0;
        r[j]      <= '0;
      end
    end else begin
      for (int j = 0; j < N; j++) begin
        prod_r[j] <= ACC_W'(d_dly[LA][j] * $signed({1'b0, m_coef}));
        p_r[j]    <= p[j];
        r[j]      <= (p_r[j] <<< M_FRAC) + prod_r[j];
      end
    end
  end

endmodule
