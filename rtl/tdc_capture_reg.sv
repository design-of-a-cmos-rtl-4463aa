// Register block: stores the sampler outputs when the delayed input rises.
//
// The samplers keep sampling, so their outputs only show where the input edge fell
// shortly after it. The register is clocked by a copy of the same input delayed by
// 500 ps and keeps that one snapshot for the rest of the measurement: 20 of the 32
// samplers have then seen the edge, 12 have not. captured rises with the snapshot;
// it and the asynchronous active-low reset that re-arms the register between
// measurements are this design's own additions.
module tdc_capture_reg #(
  parameter int unsigned N = tdc_pkg::NUM_PHASES
) (
  input  logic         clk,       // delayed START or STOP
  input  logic         rst_n,     // asynchronous, active low
  input  logic [N-1:0] d,         // sampler outputs
  output logic [N-1:0] q,         // stored snapshot
  output logic         captured   // a snapshot has been stored
);
  timeunit 1ps;
  timeprecision 1fs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q        <= '0;
      captured <= 1'b0;
    end else begin
      q        <= d;
      captured <= 1'b1;
    end
  end
endmodule
