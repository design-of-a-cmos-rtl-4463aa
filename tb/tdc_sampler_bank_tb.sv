// Test of the sampler bunch: 32 ideal phases 25 ps apart, an input edge at a random
// point; after the edge each sampler must hold 1 exactly when its clock has risen
// since the edge (a circular thermometer code), worked out from the edge time.
module tdc_sampler_bank_tb;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int N = 32;
  logic [N-1:0] phase = '0, q;
  logic data_in = 1'b0;
  int checks = 0, failures = 0;

  tdc_sampler_bank #(.N(N)) u_dut (.phase, .data_in, .q);

  // phase[j] rises at j*25 + 800*n ps, high for 400 ps
  for (genvar j = 0; j < N; j++) begin : g_clk
    initial begin
      #(j * 25.0);
      forever begin phase[j] = 1'b1; #400; phase[j] = 1'b0; #400; end
    end
  end

  initial begin
    real t_edge, t_now;
    logic [N-1:0] expq;
    for (int i = 0; i < 60; i++) begin
      data_in = 1'b0;
      #(800 * 2);                          // every sampler sees 0
      t_edge = 800.0 * $ceil($realtime / 800.0) + $urandom_range(0, 31) * 25.0 + 12.5
               + $urandom_range(0, 5);
      #(t_edge - $realtime) data_in = 1'b1;
      for (int w = 0; w < 4; w++) begin
        #($urandom_range(30, 300));
        t_now = $realtime;
        for (int j = 0; j < N; j++) begin
          // last rising edge of phase j at or before now
          automatic real last = j * 25.0 + 800.0 * $floor((t_now - j * 25.0) / 800.0);
          expq[j] = (last > t_edge);
        end
        checks++;
        if (q !== expq) begin
          failures++;
          $display("FAIL: edge %0.1f now %0.1f q=%b expected %b", t_edge, t_now, q, expq);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(800 * 1000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
