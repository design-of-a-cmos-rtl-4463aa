// Test of the shift register: with START at a random point and STOP n periods
// later, the register must hold min(number of reference edges between them, 5)
// ones as a thermometer code, hold it after STOP, and clear on reset.
module tdc_shift_reg_tb;
  timeunit 1ps;
  timeprecision 1fs;

  logic ref_clk = 1'b0, rst_n = 1'b1, start = 1'b0, stop = 1'b0;
  logic [4:0] sr;
  int checks = 0, failures = 0;

  tdc_shift_reg #(.SR_BITS(5)) u_dut (.ref_clk, .rst_n, .start, .stop, .sr);

  always #400 ref_clk = ~ref_clk;   // rising edges at 400 + 800 n

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    real a, t;
    int  edges, expn;
    logic [4:0] thermo;
    #10 rst_n = 1'b0;
    for (int i = 0; i < 200; i++) begin
      start = 1'b0; stop = 1'b0;
      #500 rst_n = 1'b0;
      #20 check(sr == '0, "reset clears");
      rst_n = 1'b1;
      @(posedge ref_clk);
      a = 10.0 + $urandom_range(0, 780);
      t = 10.0 + $urandom_range(0, 6000);
      #(a) start = 1'b1;
      #(t) stop = 1'b1;
      edges = int'($floor((a + t) / 800.0));   // edges strictly between START and STOP
      expn  = edges > 5 ? 5 : edges;
      thermo = 5'((1 << expn) - 1);
      #1 check(sr == thermo, $sformatf("a=%0.0f t=%0.0f: %b expected %b", a, t, sr, thermo));
      #2000 check(sr == thermo, "held after STOP");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(800 * 5000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
