// Sampler bunch: N samplers sharing one input, sampler k clocked by phase k.
//
// With the phases 25 ps apart, the samplers take N snapshots of the input spread
// evenly over one 800 ps clock period. After an input edge, every sampler whose clock
// has risen since the edge holds 1 and the others still hold 0, so q is a circular
// thermometer code whose 0-to-1 boundary marks the phase that first saw the edge.
// All sampler inputs are wired in parallel, as in the design.
module tdc_sampler_bank #(
  parameter int unsigned N = tdc_pkg::NUM_PHASES
) (
  input  logic [N-1:0] phase,    // phase[k] rises k*25 ps after phase[0]
  input  logic         data_in,  // START or STOP
  output logic [N-1:0] q         // sampler outputs
);
  timeunit 1ps;
  timeprecision 1fs;

  for (genvar k = 0; k < N; k++) begin : g_smp
    logic unused_b;
    tdc_sampler u_smp (.clk(phase[k]), .data_in(data_in), .d(q[k]), .d_b(unused_b));
  end
endmodule
