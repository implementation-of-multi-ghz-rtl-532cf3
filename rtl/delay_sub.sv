// delay_sub: parallel delay-and-subtract stage, d(n) = x(n) - x(n-D).
//
// This is one of the two "FIR" stages in front of the trapezoidal shaper:
// with D = k it forms d^k(n), and a second copy with D = l forms d^{k,l}(n).
// The stream arrives N samples per clock (lane 0 oldest). A delay of D
// samples is split into Q = D / N whole words and a lane rotation R = D mod N.
// Past words sit in a circular buffer (block-RAM style, read registered);
// each clock reads the words Q and Q+1 clocks old, and lane j takes its
// delayed sample from the first word at lane j-R when j >= R, otherwise from
// the older word at lane N+j-R. For Q = 0 the current input word stands in
// for the first read.
//
// Interface: x[N] samples, dly the delay D in samples (0 to D_MAX, larger
// values are clamped), d[N] the differences, one bit wider than x. Timing:
// d for word t appears 2 clocks after x; dly is taken together with the word
// it applies to, so it may change between words. Samples older than the
// reset count as zero: a fill counter masks buffer words not yet written
// since rst (synchronous, active high), so the buffer itself needs no reset.
//
// The delay-and-subtract function and its replication over N lanes follow
// the source description; the word/lane split, the buffer depth and the
// zero history after reset are this design's choices.
module delay_sub #(
  parameter int unsigned N     = trap_pkg::LANES_DEF,
  parameter int unsigned W     = trap_pkg::SAMPLE_W_DEF,
  parameter int unsigned D_MAX = trap_pkg::K_MAX_DEF,
  localparam int unsigned DW   = $clog2(D_MAX + 1)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic signed [W-1:0]  x [N],
  input  logic        [DW-1:0] dly,
  output logic signed [W:0]    d [N]
);

  localparam int unsigned Q_MAX = D_MAX / N;
  localparam int unsigned DEPTH = 1 << $clog2(Q_MAX + 2);
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned LW    = (N > 1) ? $clog2(N) : 1;

  // The lane arithmetic below relies on N being a power of two.
  if (N == 0 || (N & (N - 1)) != 0) begin : g_check_n
    $error("N must be a power of two");
  end

  typedef logic signed [W-1:0] word_t [N];

  word_t mem [DEPTH];
  logic [AW-1:0] wp;
  logic [AW:0]   filled;       // words written since reset, saturating

  logic [DW-1:0] dly_c;
  logic [AW:0]   q;            // whole-word part of the delay
  logic [LW-1:0] r;            // lane rotation

  always_comb begin
    dly_c = (dly > DW'(D_MAX)) ? DW'(D_MAX) : dly;
    q     = (AW+1)'(dly_c / N);
    r     = (N > 1) ? LW'(dly_c % N) : '0;
  end

  // Stage 1: buffer write and the two delayed-word reads.
  word_t cur_r, a_r, b_r;
  logic [LW-1:0] r_r;

  always_ff @(posedge clk) begin
    mem[wp] <= x;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp     <= '0;
      filled <= '0;
      r_r    <= '0;
      for (int j = 0; j < N; j++) begin
        cur_r[j] <= '0;
        a_r[j]   <= '0;
        b_r[j]   <= '0;
      end
    end else begin
      wp  <= wp + 1'b1;
      if (filled != (AW+1)'(DEPTH)) filled <= filled + 1'b1;
      cur_r <= x;
      r_r   <= r;
      if (q == '0)
        a_r <= x;
      else if (q <= filled)
        a_r <= mem[wp - AW'(q)];
      else
        for (int j = 0; j < N; j++) a_r[j] <= '0;
      if (q + 1'b1 <= filled)
        b_r <= mem[wp - AW'(q) - 1'b1];
      else
        for (int j = 0; j < N; j++) b_r[j] <= '0;
    end
  end

  // Stage 2: lane rotation and subtraction.
  logic signed [W-1:0] del [N];

  always_comb begin
    for (int j = 0; j < N; j++) begin
      if (LW'(j) >= r_r) del[j] = a_r[LW'(j) - r_r];
      else               del[j] = b_r[LW'(j) - r_r];   // wraps to N+j-R
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int j = 0; j < N; j++) d[j] <= '0;
    end else begin
      for (int j = 0; j < N; j++) d[j] <= (W+1)'(cur_r[j]) - (W+1)'(del[j]);
    end
  end

endmodule
