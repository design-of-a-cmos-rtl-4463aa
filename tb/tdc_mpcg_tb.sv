// Test of the multiphase clock generator: after reset the control voltage must
// settle near 2.0 V (stage delay 425 ps), every phase must be a 1.25 GHz clock with
// rising edges j*25 ps after phase 0 (within 3 ps of loop dither), ref_clk must be
// phase 0, and phi17_b must rise with phi1. Measured over 20 periods.
module tdc_mpcg_tb;
  timeunit 1ps;
  timeprecision 1fs;

  logic clk_in = 1'b0, rst_n = 1'b1, ref_clk;
  logic [31:0] phase;
  real vctrl;
  int checks = 0, failures = 0;

  tdc_mpcg u_dut (.clk_in, .rst_n, .phase, .ref_clk, .vctrl);

  always #400 clk_in = ~clk_in;

  realtime last_rise [32];
  realtime t0;
  always @(posedge phase[0]) t0 = $realtime;
  for (genvar j = 0; j < 32; j++) begin : g_mon
    always @(posedge phase[j]) last_rise[j] = $realtime;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    real off, worst;
    #10 rst_n = 1'b0;
    #2000 rst_n = 1'b1;
    #(800 * 600);
    check(vctrl > 1.95 && vctrl < 2.05, $sformatf("control voltage %0.4f V not near 2.0 V", vctrl));
    worst = 0.0;
    repeat (20) begin
      @(posedge phase[0]);
      #799;                               // all phases have risen once since
      for (int j = 1; j < 32; j++) begin
        off = last_rise[j] - t0;
        if (off < 0) off += 800.0;
        check(off > j * 25.0 - 3.0 && off < j * 25.0 + 3.0,
              $sformatf("phase %0d at %0.2f ps", j, off));
        if (off - j * 25.0 > worst) worst = off - j * 25.0;
        if (j * 25.0 - off > worst) worst = j * 25.0 - off;
      end
      check(ref_clk == phase[0], "ref_clk is phase 0");
    end
    // period of phase 0
    @(posedge phase[0]); off = $realtime;
    @(posedge phase[0]); off = $realtime - off;
    check(off > 797.0 && off < 803.0, $sformatf("period %0.2f ps", off));
    // phi17_b (complement of stage 17) against phi1
    @(posedge u_dut.s_out[1]); off = $realtime;
    @(posedge u_dut.s_out_b[17]);
    off = $realtime - off;
    if (off > 400.0) off -= 800.0;
    check(off > -5.0 && off < 5.0, $sformatf("phi17_b to phi1 %0.2f ps", off));
    $display("worst phase error %0.3f ps, vctrl %0.4f V", worst, vctrl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(800 * 2000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
