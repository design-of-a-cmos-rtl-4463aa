// Test of the charge pump and loop filter: each clock edge moves the voltage by
// +1 mV (up) or -1 mV (dn), not at all when neither or both are set; it stays
// within 0..3.3 V and reset returns it to 1.65 V.
module tdc_dll_cp_tb;
  timeunit 1ps;
  timeprecision 1fs;

  logic clk = 1'b0, rst_n = 1'b1, up = 1'b0, dn = 1'b0;
  real  vctrl;
  int checks = 0, failures = 0;

  tdc_dll_cp u_dut (.clk, .rst_n, .up, .dn, .vctrl);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit near(real a, real b);
    return (a - b < 1e-9) && (b - a < 1e-9);
  endfunction

  initial begin
    real model;
    #10 rst_n = 1'b0;
    #10 check(near(vctrl, 1.65), "reset value");
    rst_n = 1'b1;
    model = 1.65;
    for (int i = 0; i < 8000; i++) begin
      // bias the walk so both clamps are reached
      int r = $urandom_range(0, 99);
      int phase = (i / 2000) % 2;
      up = (phase == 0) ? (r < 80) : (r < 10);
      dn = (phase == 0) ? (r >= 85) : (r >= 20);
      #10 clk = 1'b1;
      if (up && !dn) model += 0.001;
      if (dn && !up) model -= 0.001;
      if (model > 3.3) model = 3.3;
      if (model < 0.0) model = 0.0;
      #1 check(near(vctrl, model) || (vctrl - model < 1e-6 && model - vctrl < 1e-6),
               $sformatf("step %0d: %0.6f expected %0.6f", i, vctrl, model));
      #10 clk = 1'b0;
    end
    check(vctrl >= 0.0 && vctrl <= 3.3, "range");
    #10 rst_n = 1'b0;
    #10 check(near(vctrl, 1.65), "reset returns to 1.65 V");
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
