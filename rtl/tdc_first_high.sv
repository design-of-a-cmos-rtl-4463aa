// MUX block: keeps only the first sampler that went high.
//
// The stored snapshot is a circular thermometer code (a run of ones after the input
// edge, zeros before it). A ring of 2:1 multiplexers turns it into a one-hot word:
// MUX k passes sampler k's value when sampler k-1 is low and passes ground when
// sampler k-1 is high, and MUX 0 looks at the last sampler, N-1. The single output
// left high marks the phase that first saw the edge. Purely combinational.
module tdc_first_high #(
  parameter int unsigned N = tdc_pkg::NUM_PHASES
) (
  input  logic [N-1:0] q,       // stored sampler values
  output logic [N-1:0] onehot   // 1 only where q goes from 0 to 1
);
  timeunit 1ps;
  timeprecision 1fs;

  always_comb begin
    for (int k = 0; k < N; k++) begin
      // select = previous sampler; 1 selects ground, 0 selects this sampler
      onehot[k] = q[(k + N - 1) % N] ? 1'b0 : q[k];
    end
  end
endmodule
