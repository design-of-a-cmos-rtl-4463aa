// Digital sampler: one sampling cell of a sampler bunch.
//
// In silicon this is a clocked sense amplifier followed by an R-S latch: when its
// clock rises it decides whether the input is above the 1.65 V bias point and the
// latch holds that decision until the next evaluation. At the logic level that is an
// edge-triggered sample-and-hold, which is what this module is: d takes data_in on
// each rising edge of clk and keeps it; d_b is the complement, as on the latch's
// second output. The latch has no reset of its own; its value is defined after the
// first clock edge. The rising edge as the sampling edge and the zero clock-to-output
// delay (the circuit needs about 400 ps) are this model's choices.
module tdc_sampler (
  input  logic clk,      // one of the 32 sampling phases
  input  logic data_in,  // START or STOP
  output logic d,        // sampled value
  output logic d_b       // its complement
);
  timeunit 1ps;
  timeprecision 1fs;

  always_ff @(posedge clk) d <= data_in;

  assign d_b = ~d;
endmodule
