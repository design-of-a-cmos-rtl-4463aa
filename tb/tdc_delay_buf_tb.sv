// Test of the 500 ps delay buffer: random pulses and gaps of 50..900 ps, several
// shorter than the delay; every input edge must reappear exactly 500 ps later with
// its value, none may be lost and none added.
module tdc_delay_buf_tb;
  timeunit 1ps;
  timeprecision 1fs;

  logic in = 1'b0, out;
  int checks = 0, failures = 0;
  realtime t_q [$];
  logic    v_q [$];

  tdc_delay_buf u_dut (.in, .out);

  // monitor: each output edge must match the oldest pending input edge
  always @(out) begin
    if ($realtime > 0) begin
      checks++;
      if (t_q.size() == 0) begin
        failures++; $display("FAIL: output edge at %0.1f with no input edge", $realtime);
      end else begin
        automatic realtime t = t_q.pop_front();
        automatic logic    v = v_q.pop_front();
        if ($realtime - t != 500.0 || out != v) begin
          failures++;
          $display("FAIL: input edge at %0.1f seen at %0.1f value %0d", t, $realtime, out);
        end
      end
    end
  end

  initial begin
    #1000;
    for (int i = 0; i < 200; i++) begin
      in = ~in;
      t_q.push_back($realtime);
      v_q.push_back(in);
      #($urandom_range(50, 900) + 0.25);
    end
    #1000;
    checks++;
    if (t_q.size() != 0) begin failures++; $display("FAIL: %0d edges lost", t_q.size()); end
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
