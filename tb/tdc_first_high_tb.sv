// Test of the MUX block: for every circular thermometer run (all start points and
// lengths 1..31) the output is one-hot at the start of the run; random words are
// checked against the rule out[k] = q[k] & ~q[k-1] computed here.
module tdc_first_high_tb;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int N = 32;
  logic [N-1:0] q, onehot;
  int checks = 0, failures = 0;

  tdc_first_high #(.N(N)) u_dut (.q, .onehot);

  initial begin
    logic [N-1:0] expo;
    for (int s = 0; s < N; s++) begin
      for (int len = 1; len < N; len++) begin
        q = '0;
        for (int i = 0; i < len; i++) q[(s + i) % N] = 1'b1;
        #1;
        checks++;
        if (onehot != (N'(1) << s)) begin
          failures++;
          $display("FAIL: run at %0d length %0d: %b", s, len, onehot);
        end
      end
    end
    for (int i = 0; i < 500; i++) begin
      q = $urandom;
      for (int k = 0; k < N; k++) expo[k] = q[k] && !q[(k + N - 1) % N];
      #1;
      checks++;
      if (onehot != expo) begin failures++; $display("FAIL: q=%b out=%b", q, onehot); end
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
