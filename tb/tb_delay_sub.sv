// tb_delay_sub: self-checking test of delay_sub with 4 and 16 lanes.
//
// Random samples stream in every clock while the delay is changed between
// words: zero, shorter than one word, whole words, odd lane rotations, the
// maximum and a value above it (clamped). The testbench keeps every sample
// since reset and computes x(n) - x(n-D), with samples before the reset
// taken as zero, and compares every lane exactly two clocks after the input.
module tb_delay_sub;

  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned W      = 14;
  localparam int unsigned NA     = 4;
  localparam int unsigned DMAX_A = 40;
  localparam int unsigned NB     = 16;
  localparam int unsigned DMAX_B = 512;
  localparam int unsigned LAT    = 2;
  localparam int unsigned DWA    = $clog2(DMAX_A + 1);
  localparam int unsigned DWB    = $clog2(DMAX_B + 1);

  logic clk = 1'b0;
  logic rst;
  always #1 clk = ~clk;

  logic signed [W-1:0] xa [NA];
  logic signed [W:0]   da [NA];
  logic [DWA-1:0]      dly_a;
  logic signed [W-1:0] xb [NB];
  logic signed [W:0]   db [NB];
  logic [DWB-1:0]      dly_b;

  delay_sub #(.N(NA), .W(W), .D_MAX(DMAX_A)) dut_a (.clk, .rst, .x(xa), .dly(dly_a), .d(da));
  delay_sub #(.N(NB), .W(W), .D_MAX(DMAX_B)) dut_b (.clk, .rst, .x(xb), .dly(dly_b), .d(db));

  int checks = 0, failures = 0;
  int hist_a [$];
  int hist_b [$];
  int exp_a  [$];
  int exp_b  [$];
  int n_rot = 0, n_whole = 0, n_short = 0, n_clamp = 0;

  function automatic int past(ref int h [$], input int idx);
    return (idx < 0) ? 0 : h[idx];
  endfunction

  task automatic run(int ncyc, int da_v, int db_v);
    int dca, dcb, base;
    dly_a = DWA'(da_v);
    dly_b = DWB'(db_v);
    dca = (da_v > DMAX_A) ? DMAX_A : da_v;
    dcb = (db_v > DMAX_B) ? DMAX_B : db_v;
    if (dcb % NB != 0) n_rot++; else n_whole++;
    if (dcb < NB || dca < NA) n_short++;
    if (da_v > DMAX_A) n_clamp++;
    for (int c = 0; c < ncyc; c++) begin
      base = hist_a.size();
      for (int j = 0; j < NA; j++) begin
        xa[j] = W'($urandom);
        hist_a.push_back(int'(xa[j]));
        exp_a.push_back(int'(xa[j]) - past(hist_a, base + j - dca));
      end
      base = hist_b.size();
      for (int j = 0; j < NB; j++) begin
        xb[j] = W'($urandom);
        hist_b.push_back(int'(xb[j]));
        exp_b.push_back(int'(xb[j]) - past(hist_b, base + j - dcb));
      end
      @(posedge clk);
      #0.1;
      if (exp_a.size() == LAT * NA)
        for (int j = 0; j < NA; j++) begin
          int e = exp_a.pop_front();
          checks++;
          if (int'(da[j]) != e) begin
            failures++;
            if (failures < 10) $display("N=4 D=%0d lane %0d: got %0d expected %0d", dca, j, da[j], e);
          end
        end
      if (exp_b.size() == LAT * NB)
        for (int j = 0; j < NB; j++) begin
          int e = exp_b.pop_front();
          checks++;
          if (int'(db[j]) != e) begin
            failures++;
            if (failures < 10) $display("N=16 D=%0d lane %0d: got %0d expected %0d", dcb, j, db[j], e);
          end
        end
    end
  endtask

  task automatic do_reset();
    rst = 1'b1;
    for (int j = 0; j < NA; j++) xa[j] = '0;
    for (int j = 0; j < NB; j++) xb[j] = '0;
    repeat (3) @(posedge clk);
    #0.1;
    rst = 1'b0;
    hist_a.delete(); hist_b.delete();
    exp_a.delete();  exp_b.delete();
  endtask

  initial begin
    do_reset();
    // Fill from reset with long delays: history must read as zero.
    run(60, 37, 300);
    run(40, 0, 0);
    run(40, 3, 5);
    run(40, 8, 16);
    run(40, 13, 150);
    run(40, 40, 512);
    run(40, 60, 600);
    run(40, 21, 199);
    for (int i = 0; i < 20; i++) run(20, $urandom_range(DMAX_A), $urandom_range(DMAX_B));
    do_reset();
    run(50, 9, 100);
    $display("delay changes: rotated %0d whole-word %0d short %0d clamped %0d", n_rot, n_whole, n_short, n_clamp);
    if (n_rot == 0 || n_whole == 0 || n_short == 0 || n_clamp == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
