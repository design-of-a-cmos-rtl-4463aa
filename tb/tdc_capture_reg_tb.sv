// Test of the register block: stores d on the rising clock edge only, holds it while
// d changes, and clears (captured low) on the asynchronous reset.
module tdc_capture_reg_tb;
  timeunit 1ps;
  timeprecision 1fs;

  logic clk = 1'b0, rst_n = 1'b1, captured;
  logic [31:0] d = '0, q;
  int checks = 0, failures = 0;

  tdc_capture_reg #(.N(32)) u_dut (.clk, .rst_n, .d, .q, .captured);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [31:0] v;
    for (int i = 0; i < 100; i++) begin
      #10 rst_n = 1'b0;
      #10 check(q == '0 && !captured, "reset clears");
      d = $urandom;
      #10 rst_n = 1'b1;
      #10 check(q == '0 && !captured, "nothing stored before the edge");
      v = $urandom;
      d = v;
      #10 clk = 1'b1;
      #1 check(q == v && captured, $sformatf("stored %h expected %h", q, v));
      d = ~v;
      #10 check(q == v, "held while d changes");
      clk = 1'b0;
      #10 check(q == v && captured, "held after the falling edge");
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
