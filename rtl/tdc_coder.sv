// Coding block: turns the one-hot MUX outputs into the 5-bit digital value.
//
// If the first sampler to see the edge is k (clocked k*25 ps after the reference
// clock), the edge fell in the 25 ps before that phase, so the time from the edge to
// the next reference edge is (N-k)*25 ps rounded down to whole LSBs. The code is that
// number of LSBs, (N-k) mod N: with this definition the interval is
// shift_register*800 ps + (START code - STOP code)*25 ps, as in the design's output
// equation. hit is low when no bit is set (nothing captured); the code is then 0.
// Combinational. The OR-tree encoding is this implementation's choice.
module tdc_coder #(
  parameter int unsigned N = tdc_pkg::NUM_PHASES,
  localparam int unsigned W = $clog2(N)
) (
  input  logic [N-1:0] onehot,  // from the MUX block
  output logic [W-1:0] code,    // LSBs from the input edge to the next reference edge
  output logic         hit      // some bit was set
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [W-1:0] idx;

  always_comb begin
    idx = '0;
    for (int k = 0; k < N; k++) begin
      if (onehot[k]) idx |= W'(k);
    end
  end

  assign hit  = |onehot;
  assign code = W'(N) - idx;  // (N - k) mod N, N a power of two
endmodule
