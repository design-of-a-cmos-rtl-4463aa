// Behavioural model (not synthesizable): the multiphase clock generator, a
// delay-locked loop that turns one 1.25 GHz clock into 32 clocks 25 ps apart.
//
// No gate is faster than about 100 ps, so the 25 ps step is not made by 25 ps delays.
// Instead every stage delays by half a period plus one LSB, 400 + 25 = 425 ps. Stage
// k then lags stage 1 by (k-1)*425 ps, i.e. by (k-1)*25 ps plus 400 ps when k-1 is
// odd; taking each stage output or its complement, whichever is in the first half of
// the period, gives 16 clocks 25 ps apart, and their complements the other 16. The
// loop holds the stage delay at 425 ps by comparing phi1 with phi17_b, which coincide
// when 16 delays equal 8.5 periods. The chain has 19 stages: a dummy driven by the
// input clock, the 17 active stages, and a dummy load after stage 17 so that every
// active stage sees the same load.
//
// Outputs: phase[j] rises j*25 ps after phase[0]; ref_clk is phase[0] (phi1), the
// reference clock of the shift register; vctrl is the control voltage. The chain,
// the stage count and the 425 ps / 25 ps numbers follow the design; the stage curve,
// the pump step and the bang-bang detector are this model's (see the sub-modules).
// After reset the loop needs about 400 input cycles to settle.
module tdc_mpcg #(
  parameter int unsigned N          = tdc_pkg::NUM_PHASES,
  parameter int unsigned NUM_STAGES = tdc_pkg::DLL_STAGES
) (
  input  logic         clk_in,   // 1.25 GHz input clock
  input  logic         rst_n,    // asynchronous, active low: restarts the loop
  output logic [N-1:0] phase,    // sampling clocks
  output logic         ref_clk,  // phase 0
  output real          vctrl     // loop filter voltage
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned HALF = N / 2;  // active stages used for phases (16)

  logic [NUM_STAGES-1:0] s_out, s_out_b;
  logic [NUM_STAGES:0]   s_in;
  logic                  up, dn;

  assign s_in[0] = clk_in;

  for (genvar k = 0; k < NUM_STAGES; k++) begin : g_stage
    tdc_dll_stage u_stage (.in(s_in[k]), .vctrl(vctrl), .out(s_out[k]), .out_b(s_out_b[k]));
    assign s_in[k+1] = s_out[k];
  end

  // s_out[k] is phi_k: index 0 and NUM_STAGES-1 are the dummies.
  for (genvar m = 0; m < HALF; m++) begin : g_phase
    if (m % 2 == 0) begin : g_even
      assign phase[m]        = s_out[m+1];
      assign phase[m + HALF] = s_out_b[m+1];
    end else begin : g_odd
      assign phase[m]        = s_out_b[m+1];
      assign phase[m + HALF] = s_out[m+1];
    end
  end

  assign ref_clk = phase[0];

  tdc_dll_pd u_pd (.ref_a(s_out[1]), .fb(s_out_b[HALF+1]), .rst_n(rst_n), .up(up), .dn(dn));
  tdc_dll_cp u_cp (.clk(s_out[1]), .rst_n(rst_n), .up(up), .dn(dn), .vctrl(vctrl));

  // The last dummy stage is only a load; its outputs and s_in[NUM_STAGES] are unused.
  logic unused_load;
  assign unused_load = ^{s_in[NUM_STAGES], s_out_b[NUM_STAGES-1], s_out_b[0]};
endmodule
