// tb_trap_rates: sample-rate comparison workload.
//
// The same kind of detector pulse (20 ns decay), shaped with a 30 ns rise
// time and 10 ns flat top, is processed by four builds of the filter that
// match four converter rates at a word clock of 200-312.5 MHz:
//   200 MS/s with 1 lane, 1 GS/s with 4 lanes, 2.5 GS/s with 8 lanes and
//   5 GS/s with 16 lanes.
// Each leg checks its output exactly against a recursive model and reports
// the peak-to-peak spread of the flat-top height caused by the random
// arrival phase of the pulses. The spread must shrink as the rate rises,
// since the worst-case phase error is about Ts/tau.
module tb_trap_rates;

  timeunit 1ns;
  timeprecision 1ps;

  logic done [4];
  int   c [4], f [4], sp [4], np [4];

  tb_rate_run #(.N(1),  .TS_PS(5000)) r200m (.done(done[0]), .checks(c[0]), .failures(f[0]), .spread_ppm(sp[0]), .pulses(np[0]));
  tb_rate_run #(.N(4),  .TS_PS(1000)) r1g   (.done(done[1]), .checks(c[1]), .failures(f[1]), .spread_ppm(sp[1]), .pulses(np[1]));
  tb_rate_run #(.N(8),  .TS_PS(400))  r2g5  (.done(done[2]), .checks(c[2]), .failures(f[2]), .spread_ppm(sp[2]), .pulses(np[2]));
  tb_rate_run #(.N(16), .TS_PS(200))  r5g   (.done(done[3]), .checks(c[3]), .failures(f[3]), .spread_ppm(sp[3]), .pulses(np[3]));

  int checks = 0, failures = 0;
  string names [4] = '{"200 MS/s", "1 GS/s", "2.5 GS/s", "5 GS/s"};

  initial begin
    #1;  // let every leg clear its done flag first
    wait (done[0] && done[1] && done[2] && done[3]);
    for (int i = 0; i < 4; i++) begin
      $display("%s: %0d pulses, flat-top spread %0.3f %% pp", names[i], np[i], real'(sp[i]) / 1.0e4);
      checks += c[i];
      failures += f[i];
      checks++;
      if (np[i] == 0) failures++;
    end
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (sp[i] <= sp[i+1]) begin
        failures++;
        $display("spread did not shrink from %s to %s", names[i], names[i+1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
