// tb_parallel_acc: self-checking test of parallel_acc with 4 and 16 lanes.
//
// Random signed samples (with runs of full-scale values to exercise
// wrap-free large sums) are fed every clock. A sample-by-sample running sum
// kept in the testbench gives the expected value of every lane; the outputs
// are compared exactly, log2(N)+1 clocks after the input (3 clocks for four
// lanes). A mid-run reset checks that the sum restarts from zero.
module tb_parallel_acc;

  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned IN_W  = 16;
  localparam int unsigned ACC_W = 64;
  localparam int unsigned N4    = 4;
  localparam int unsigned N16   = 16;
  localparam int unsigned LAT4  = 3;   // stated pipeline delay for N = 4
  localparam int unsigned LAT16 = 5;

  logic clk = 1'b0;
  logic rst;
  always #1 clk = ~clk;

  logic signed [IN_W-1:0]  x4  [N4];
  logic signed [ACC_W-1:0] y4  [N4];
  logic signed [IN_W-1:0]  x16 [N16];
  logic signed [ACC_W-1:0] y16 [N16];

  parallel_acc #(.N(N4),  .IN_W(IN_W), .ACC_W(ACC_W)) dut4  (.clk, .rst, .x(x4),  .y(y4));
  parallel_acc #(.N(N16), .IN_W(IN_W), .ACC_W(ACC_W)) dut16 (.clk, .rst, .x(x16), .y(y16));

  int checks = 0, failures = 0;

  // Expected outputs queued per clock.
  // Flat queues, N entries per clock.
  longint exp4  [$];
  longint exp16 [$];
  longint sum4, sum16;
  int     cyc;

  function automatic logic signed [IN_W-1:0] rnd(int c);
    if ((c / 64) % 3 == 1) return 16'sh7fff;           // long positive run
    return IN_W'($urandom);
  endfunction

  task automatic drive_and_check(int ncyc);
    longint e;
    for (int c = 0; c < ncyc; c++) begin
      for (int j = 0; j < N4; j++) begin
        x4[j] = rnd(cyc);
        sum4 += longint'(x4[j]);
        exp4.push_back(sum4);
      end
      for (int j = 0; j < N16; j++) begin
        x16[j] = rnd(cyc);
        sum16 += longint'(x16[j]);
        exp16.push_back(sum16);
      end
      @(posedge clk);
      #0.1;
      cyc++;
      // Output after LAT clocks belongs to the input LAT entries back.
      if (exp4.size() == LAT4 * N4) begin
        for (int j = 0; j < N4; j++) begin
          e = exp4.pop_front();
          checks++;
          if (y4[j] !== e) begin
            failures++;
            if (failures < 10) $display("N=4 cycle %0d lane %0d: got %0d expected %0d", cyc, j, y4[j], e);
          end
        end
      end
      if (exp16.size() == LAT16 * N16) begin
        for (int j = 0; j < N16; j++) begin
          e = exp16.pop_front();
          checks++;
          if (y16[j] !== e) begin
            failures++;
            if (failures < 10) $display("N=16 cycle %0d lane %0d: got %0d expected %0d", cyc, j, y16[j], e);
          end
        end
      end
    end
  endtask

  task automatic do_reset();
    rst = 1'b1;
    for (int j = 0; j < N4; j++)  x4[j]  = '0;
    for (int j = 0; j < N16; j++) x16[j] = '0;
    repeat (3) @(posedge clk);
    #0.1;
    rst = 1'b0;
    exp4.delete();
    exp16.delete();
    sum4 = 0;
    sum16 = 0;
  endtask

  initial begin
    cyc = 0;
    do_reset();
    drive_and_check(1000);
    do_reset();
    drive_and_check(500);
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
