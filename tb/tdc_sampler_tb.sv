// Test of one sampler: the output follows the input only at rising clock edges
// and holds in between; d_b is always the complement.
module tdc_sampler_tb;
  timeunit 1ps;
  timeprecision 1fs;

  logic clk = 1'b0, data_in = 1'b0, d, d_b;
  int checks = 0, failures = 0;

  tdc_sampler u_dut (.clk, .data_in, .d, .d_b);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic model;
    #10 clk = 1'b1; #10 clk = 1'b0;       // first edge samples 0
    model = 1'b0;
    for (int i = 0; i < 200; i++) begin
      data_in = 1'($urandom);
      #5 check(d == model, "output changed without a clock edge");
      check(d_b == ~d, "d_b is not the complement");
      clk = 1'b1;
      model = data_in;
      #1 check(d == model, $sformatf("sample %0d: got %0d expected %0d", i, d, model));
      data_in = ~data_in;                  // change while clock high: must hold
      #5 check(d == model, "output followed input while clock high");
      clk = 1'b0;
      #5 check(d == model, "output changed on the falling edge");
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
