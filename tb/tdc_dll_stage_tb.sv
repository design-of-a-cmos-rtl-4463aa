// Test of the voltage-controlled delay stage: at several control voltages each
// edge of a 1.25 GHz clock appears 375 + 25*V ps later (425 ps at 2.0 V), with
// 400 ps pulses shorter than the delay passed intact; out_b is the complement.
module tdc_dll_stage_tb;
  timeunit 1ps;
  timeprecision 1fs;

  logic in = 1'b0, out, out_b;
  real  vctrl = 2.0;
  int checks = 0, failures = 0;
  realtime t_q [$];

  tdc_dll_stage u_dut (.in, .vctrl, .out, .out_b);

  real expd;
  always @(out) begin
    if ($realtime > 0 && t_q.size() > 0) begin
      automatic realtime t = t_q.pop_front();
      automatic realtime d = $realtime - t;
      checks++;
      if (d - expd > 0.001 || expd - d > 0.001) begin
        failures++; $display("FAIL: delay %0.3f ps expected %0.3f at %0.2f V", d, expd, vctrl);
      end
      checks++;
      if (out_b != ~out) begin failures++; $display("FAIL: out_b"); end
    end
  end

  initial begin
    real vs [5] = '{2.0, 0.0, 1.0, 3.3, 1.65};
    foreach (vs[i]) begin
      vctrl = vs[i];
      expd  = 375.0 + 25.0 * vctrl;
      repeat (20) begin
        #400 in = ~in;
        t_q.push_back($realtime);
      end
      #1000;
      checks++;
      if (t_q.size() != 0) begin failures++; $display("FAIL: edges lost"); t_q.delete(); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
