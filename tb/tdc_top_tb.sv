// End-to-end test of the time-to-digital converter at its default size.
//
// Runs the 1.25 GHz clock, resets the delay-locked loop and waits for it to settle,
// then checks that the 32 phases are 25 ps apart (within 3 ps of bang-bang dither).
// It then measures intervals: the worked example of the design (START value 27,
// STOP value 23, two periods, 1700 ps), then random ones from 25 ps to beyond the
// 4.775 ns range. Each START is placed half an LSB away from a phase edge, a ps after
// a reference edge, so the expected values follow from arithmetic alone:
//   START value = floor((800 - a) / 25), STOP value likewise for (a + T) mod 800,
//   periods = min(floor((a + T) / 800), 5).
// It also checks that valid rises 500 ps after STOP. Mechanisms counted (each must
// occur): loop lock, interval inside one period, coarse count > 0, STOP value above
// START value (negative fine term), shift register full.
module tdc_top_tb;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real PERIOD = 800.0;
  localparam real LSB    = 25.0;

  logic clk_in = 1'b0, dll_rst_n = 1'b1, rst_n = 1'b1, start = 1'b0, stop = 1'b0;
  logic        ref_clk, valid, sr_full;
  logic [4:0]  start_code, stop_code, shift_reg;
  logic signed [8:0]  interval_lsb;
  logic signed [13:0] interval_ps;

  tdc_top u_dut (.*);

  always #(PERIOD / 2.0) clk_in = ~clk_in;

  int checks = 0, failures = 0;
  int n_lock = 0, n_same_period = 0, n_coarse = 0, n_neg_fine = 0, n_full = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Phase spacing: time each phase's rising edge after one rising edge of phase 0.
  task automatic check_phases();
    realtime t0, tj;
    real err, worst = 0.0;
    for (int j = 1; j < 32; j++) begin
      @(posedge u_dut.u_mpcg.phase[0]);
      t0 = $realtime;
      @(posedge u_dut.u_mpcg.phase[j]);
      tj = $realtime;
      err = (tj - t0) - j * LSB;
      if (err < 0) err = -err;
      if (err > worst) worst = err;
      check(err < 3.0, $sformatf("phase %0d at %0.2f ps, expected %0.1f", j, tj - t0, j * LSB));
    end
    $display("phase spacing: worst error %0.3f ps, vctrl %0.4f V", worst, u_dut.u_mpcg.vctrl);
    if (worst < 3.0) n_lock++;
  endtask

  // One measurement: START a ps after a reference edge, STOP t ps later.
  task automatic measure(input real a, input real t);
    real b, fb;
    int exp_s, exp_p, exp_n, exp_lsb, full_n;
    // re-arm
    start = 1'b0; stop = 1'b0;
    #1000;
    rst_n = 1'b0; #100; rst_n = 1'b1;
    @(posedge ref_clk);
    #(a) start = 1'b1;
    #(t) stop = 1'b1;
    b      = a + t;
    fb     = b - PERIOD * $floor(b / PERIOD);
    exp_s  = int'($floor((PERIOD - a) / LSB));
    exp_p  = int'($floor((PERIOD - fb) / LSB));
    full_n = int'($floor(b / PERIOD));
    exp_n  = (full_n > 5) ? 5 : full_n;
    exp_lsb = exp_n * 32 + exp_s - exp_p;
    #499;
    check(!valid, "valid before the 500 ps capture delay");
    #2;
    check(valid, "valid 500 ps after STOP");
    check(start_code == 5'(exp_s), $sformatf("a=%0.1f t=%0.1f START value %0d, expected %0d", a, t, start_code, exp_s));
    check(stop_code == 5'(exp_p), $sformatf("a=%0.1f t=%0.1f STOP value %0d, expected %0d", a, t, stop_code, exp_p));
    check($countones(shift_reg) == exp_n, $sformatf("a=%0.1f t=%0.1f periods %0d, expected %0d", a, t, $countones(shift_reg), exp_n));
    check(int'(interval_lsb) == exp_lsb, $sformatf("a=%0.1f t=%0.1f interval %0d LSB, expected %0d", a, t, interval_lsb, exp_lsb));
    check(int'(interval_ps) == exp_lsb * 25, $sformatf("interval %0d ps, expected %0d", interval_ps, exp_lsb * 25));
    check(sr_full == (exp_n == 5), "sr_full flag");
    if (full_n < 5 || (full_n == 5 && b < 6 * PERIOD))
      check((real'(interval_ps) - t) < LSB && (t - real'(interval_ps)) < LSB,
            $sformatf("interval %0d ps against true %0.1f ps", interval_ps, t));
    if (exp_n == 0) n_same_period++;
    if (exp_n > 0)  n_coarse++;
    if (exp_p > exp_s) n_neg_fine++;
    if (exp_n == 5) n_full++;
  endtask

  initial begin
    real a, t;
    // asynchronous resets need an edge: start high, then pull low
    #10 dll_rst_n = 1'b0; rst_n = 1'b0;
    #2000 dll_rst_n = 1'b1;
    // settle: 600 input cycles
    #(600 * PERIOD);
    check_phases();

    // Worked example: START value 27, STOP value 23, 2 periods, 1700 ps.
    measure(112.5, 1700.0);
    check(start_code == 5'd27 && stop_code == 5'd23 && $countones(shift_reg) == 2 && interval_ps == 14'sd1700,
          "worked example 27 / 23 / 2 periods / 1700 ps");
    $display("example: START %0d STOP %0d shift register %b -> %0d ps", start_code, stop_code, shift_reg, interval_ps);

    // Corners: shortest, within one period, at the end of the range, beyond it.
    measure(12.5, 25.0);
    measure(787.5, 25.0);
    measure(12.5, 775.0);
    measure(412.5, 4775.0 - 400.0);
    measure(12.5, 4775.0);
    measure(112.5, 5600.0);

    for (int i = 0; i < 120; i++) begin
      a = $urandom_range(0, 31) * LSB + LSB / 2.0;
      t = $urandom_range(1, 200) * LSB;
      measure(a, t);
    end

    $display("mechanisms: lock=%0d same_period=%0d coarse=%0d negative_fine=%0d full=%0d",
             n_lock, n_same_period, n_coarse, n_neg_fine, n_full);
    check(n_lock > 0, "loop lock never happened");
    check(n_same_period > 0, "no interval inside one period");
    check(n_coarse > 0, "coarse count never used");
    check(n_neg_fine > 0, "STOP value never above START value");
    check(n_full > 0, "shift register never full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog: 3000 reference cycles.
  initial begin
    #(3000 * PERIOD);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
