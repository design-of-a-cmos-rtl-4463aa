// Test of the output arithmetic: every thermometer value 0..5 with random codes
// against periods*800 + (START - STOP)*25, including the worked example
// (2 periods, 27 and 23 -> 1700 ps).
module tdc_dsp_tb;
  timeunit 1ps;
  timeprecision 1fs;

  logic [4:0] sr, start_code, stop_code;
  logic signed [8:0]  interval_lsb;
  logic signed [13:0] interval_ps;
  logic sr_full;
  int checks = 0, failures = 0;

  tdc_dsp u_dut (.sr, .start_code, .stop_code, .interval_lsb, .interval_ps, .sr_full);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int n, s, p;
    sr = 5'b00011; start_code = 5'd27; stop_code = 5'd23;
    #1 check(interval_ps == 14'sd1700 && interval_lsb == 9'sd68, $sformatf("example gives %0d ps", interval_ps));
    for (int i = 0; i < 600; i++) begin
      n = i % 6;
      s = $urandom_range(0, 31);
      p = $urandom_range(0, 31);
      sr = 5'((1 << n) - 1);
      start_code = 5'(s);
      stop_code  = 5'(p);
      #1;
      check(int'(interval_ps) == n * 800 + (s - p) * 25,
            $sformatf("n=%0d s=%0d p=%0d: %0d ps", n, s, p, interval_ps));
      check(int'(interval_lsb) == n * 32 + s - p, "interval in LSBs");
      check(sr_full == (n == 5), "full flag");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
