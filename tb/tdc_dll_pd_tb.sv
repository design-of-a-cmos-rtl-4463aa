// Test of the phase detector: with the feedback clock rising a random amount
// before (up expected) or after (dn expected) the reference edge, within half a
// period, the decision after each reference edge must match; reset forces dn.
module tdc_dll_pd_tb;
  timeunit 1ps;
  timeprecision 1fs;

  logic ref_a = 1'b0, fb = 1'b0, rst_n = 1'b1, up, dn;
  int checks = 0, failures = 0;

  tdc_dll_pd u_dut (.ref_a, .fb, .rst_n, .up, .dn);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    real e;
    #10 rst_n = 1'b0;
    #10 check(!up && dn, "reset forces dn");
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      e = $urandom_range(1, 399) + 0.5;        // feedback offset magnitude
      if ($urandom_range(0, 1)) begin
        // feedback early: rises e before the reference edge
        #(400 - e) fb = 1'b1;
        #(e) ref_a = 1'b1;
        #0.25 check(up && !dn, $sformatf("early by %0.1f: up expected", e));
      end else begin
        // feedback late: rises e after the reference edge
        #400 ref_a = 1'b1;
        #0.25 check(!up && dn, $sformatf("late by %0.1f: dn expected", e));
        #(e - 0.25) fb = 1'b1;
      end
      #400 ref_a = 1'b0;
      fb = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
