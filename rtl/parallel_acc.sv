// parallel_acc: running sum of a stream that arrives N samples per clock.
//
// A plain accumulator y(n) = y(n-1) + x(n) needs one addition per sample;
// at N samples per clock the N additions would chain through one cycle. This
// unit splits the sum in two parts. First a prefix-sum network forms, for
// every lane i, S_i = x_0 + ... + x_i of the current word. It has no feedback
// and is registered after each of its log2(N) levels (a Sklansky tree: at
// level v, each lane whose bit v is set adds the last lane of the lower half
// of its 2^(v+1) group). For N = 4 it gives exactly s1 = x0+x1, s3 = x2+x3,
// s2 = s1+x2, s4 = s1+s3. Second, one row of N adders adds each S_i to the
// total of the previous word, which is lane N-1 of the output register (the
// "latch" that feeds every last adder). Only that row has to settle in one
// clock.
//
// Interface: x[i] is sample N*t+i of word t, sign-extended to ACC_W; y[i] is
// the running sum up to and including that sample. Arithmetic wraps modulo
// 2^ACC_W. Timing: y for word t appears log2(N)+1 clocks after x (3 clocks
// for N = 4, 5 for N = 16). rst (synchronous, active high) clears the pipeline
// and the running sum.
//
// The prefix network, the shared feedback from the last lane and the latency
// of 3 for N = 4 follow the source description; the Sklansky tree for other N
// and the register after every level are this design's choices.
module parallel_acc #(
  parameter int unsigned N     = trap_pkg::LANES_DEF,
  parameter int unsigned IN_W  = 16,
  parameter int unsigned ACC_W = trap_pkg::ACC_W_DEF
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [IN_W-1:0]  x [N],
  output logic signed [ACC_W-1:0] y [N]
);

  localparam int unsigned LEVELS = $clog2(N);

  // The lane arithmetic below relies on N being a power of two.
  if (N == 0 || (N & (N - 1)) != 0) begin : g_check_n
    $error("N must be a power of two");
  end

  // st[v] holds the partial sums after v prefix levels; st[0] is the input.
  logic signed [ACC_W-1:0] st [LEVELS+1][N];

  always_comb begin
    for (int i = 0; i < N; i++) st[0][i] = ACC_W'(x[i]);
  end

  for (genvar v = 0; v < LEVELS; v++) begin : g_level
    for (genvar i = 0; i < N; i++) begin : g_lane
      if (((i >> v) & 1) == 1) begin : g_add
        localparam int unsigned P = ((i >> v) << v) - 1;
        always_ff @(posedge clk) begin
          if (rst) st[v+1][i] <= '0;
          else     st[v+1][i] <= st[v][i] + st[v][P];
        end
      end else begin : g_pass
        always_ff @(posedge clk) begin
          if (rst) st[v+1][i] <= '0;
          else     st[v+1][i] <= st[v][i];
        end
      end
    end
  end

  // Feedback row: every lane adds the previous word's total (lane N-1).
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++) y[i] <= '0;
    end else begin
      for (int i = 0; i < N; i++) y[i] <= y[N-1] + st[LEVELS][i];
    end
  end

endmodule
