// Workload testbench: the encoder in the three DSRC downlink profiles.
//
//   CEN (Europe)   FM0         500 kb/s   CLK period 2000 ns
//   ARIB (Japan)   Manchester  4 Mb/s     CLK period  250 ns
//   ASTM (America) Manchester  27 Mb/s    CLK period  ~37.04 ns
//
// For each profile a frame of FRAME_BITS random bits is sent at one bit per
// CLK cycle, with CLK running at the profile's bit rate. Each half-bit of the
// code is sampled and checked against the coding rules computed here
// (FM0: level change at every bit boundary, mid-bit change for 0 only;
// Manchester: ~X then X). Two further checks per profile:
//   rate        the measured time from the first to the last bit window
//               matches FRAME_BITS-1 bit periods at the profile's bit rate;
//   dc-balance  the running sum of the code (+1 / -1 per half-bit) never
//               leaves [-2, 2] for FM0 and is 0 at every bit end for
//               Manchester.
module tb_dsrc_profiles;
  import sols_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int FRAME_BITS = 512;

  logic  clk = 1'b1;
  logic  clr = 1'b1, x = 1'b0, code;
  mode_e mode = MODE_FM0;
  realtime half_period = 1000.0;
  int checks = 0, failures = 0, profiles_run = 0;

  sols_encoder dut (.clk(clk), .clr(clr), .mode(mode), .x(x), .code(code));

  always #(half_period) clk = ~clk;

  initial begin : watchdog
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t %s", $realtime, what);
    end
  endtask

  task automatic run_profile(input string name, input mode_e m, input real rate_bps);
    realtime t_first, t_last, period_ns, measured;
    logic first, second, prev_second;
    int disparity, max_abs;
    period_ns   = 1.0e9 / rate_bps;
    @(posedge clk);
    half_period = period_ns / 2.0;
    // One initialisation bit with CLR high, clock already at the new rate.
    @(posedge clk);
    #(period_ns / 10.0);
    mode = m; clr = 1'b1; x = 1'b0;
    @(posedge clk);
    disparity   = 0;
    max_abs     = 0;
    prev_second = 1'b0;
    for (int i = 0; i < FRAME_BITS; i++) begin
      if (i == 0) t_first = $realtime;
      t_last = $realtime;
      #(period_ns / 10.0);
      clr = (m == MODE_MANCHESTER);
      x   = 1'($urandom);
      #(period_ns * 0.3) first  = code;
      #(period_ns * 0.5) second = code;
      if (m == MODE_FM0) begin
        check(first ^ second == ~x, $sformatf("%s bit %0d mid-bit rule", name, i));
        if (i > 0) check(first != prev_second, $sformatf("%s bit %0d boundary rule", name, i));
      end else begin
        check(first == ~x && second == x, $sformatf("%s bit %0d Manchester halves", name, i));
      end
      disparity += (first ? 1 : -1) + (second ? 1 : -1);
      if ((disparity < 0 ? -disparity : disparity) > max_abs)
        max_abs = disparity < 0 ? -disparity : disparity;
      if (m == MODE_MANCHESTER) check(disparity == 0, $sformatf("%s bit %0d dc-balance", name, i));
      prev_second = second;
      @(posedge clk);
    end
    if (m == MODE_FM0) check(max_abs <= 2, $sformatf("%s running disparity %0d", name, max_abs));
    measured = (t_last - t_first) / (FRAME_BITS - 1);
    check(measured > period_ns * 0.999 && measured < period_ns * 1.001,
          $sformatf("%s bit period %f ns, expected %f ns", name, measured, period_ns));
    $display("%s: %0d bits, bit period %0.3f ns (%0.3f Mb/s), max |disparity| %0d half-bits",
             name, FRAME_BITS, measured, 1.0e3 / measured, max_abs);
    profiles_run++;
  endtask

  initial begin
    run_profile("CEN FM0 500kb/s",        MODE_FM0,        500.0e3);
    run_profile("ARIB Manchester 4Mb/s",  MODE_MANCHESTER, 4.0e6);
    run_profile("ASTM Manchester 27Mb/s", MODE_MANCHESTER, 27.0e6);
    check(profiles_run == 3, "all profiles run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
