// Test of one START/STOP block with ideal 25 ps phases: for an input edge at every
// offset within the period (half an LSB from a phase edge) and a 500 ps delayed copy,
// the code must be floor((800 - offset) / 25) and captured must rise exactly 500 ps
// after the edge, not before.
module tdc_channel_tb;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int N = 32;
  logic [N-1:0] phase = '0;
  logic sig = 1'b0, sig_dly = 1'b0, rst_n = 1'b1, captured;
  logic [4:0] code;
  int checks = 0, failures = 0;

  tdc_channel #(.N(N)) u_dut (.phase, .sig, .sig_dly, .rst_n, .code, .captured);

  for (genvar j = 0; j < N; j++) begin : g_clk
    initial begin
      #(j * 25.0);
      forever begin phase[j] = 1'b1; #400; phase[j] = 1'b0; #400; end
    end
  end

  always @(sig) sig_dly <= #500 sig;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    real a;
    int  expc;
    #10 rst_n = 1'b0;
    for (int rep = 0; rep < 3; rep++) begin
      for (int k = 0; k < N; k++) begin
        sig = 1'b0;
        #1000 rst_n = 1'b0;
        #50 rst_n = 1'b1;
        // wait for a rising edge of phase 0, then place the edge
        @(posedge phase[0]);
        a = k * 25.0 + 12.5 + (rep - 1) * 4.0;
        #(a) sig = 1'b1;
        expc = int'($floor((800.0 - a) / 25.0)) % 32;
        #499 check(!captured, "captured before 500 ps");
        #2   check(captured, "captured 500 ps after the edge");
        check(code == 5'(expc), $sformatf("offset %0.1f: code %0d expected %0d", a, code, expc));
        #2000 check(code == 5'(expc), "code held");
      end
    end
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
