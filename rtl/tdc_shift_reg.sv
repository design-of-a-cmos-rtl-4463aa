// Coarse counter: the 5-bit shift register.
//
// The samplers resolve an edge only within one 800 ps reference period. To measure
// longer intervals the shift register shifts a 1 in on every rising edge of the
// reference clock that comes after START has risen and before STOP has risen, so its
// contents are a thermometer code of the number of whole periods between the two
// edges; with 5 bits the range becomes 5*800 ps + 775 ps = 4.775 ns. In the circuit
// STOP disconnects the reference clock from the register; here the same gating is
// written as a clock enable (start & ~stop), which is this design's choice, as is the
// asynchronous active-low reset that clears it between measurements. START and STOP
// are levels that stay high until the reset.
module tdc_shift_reg #(
  parameter int unsigned SR_BITS = tdc_pkg::SR_BITS
) (
  input  logic               ref_clk,  // reference clock, phase 0 of the generator
  input  logic               rst_n,    // asynchronous, active low
  input  logic               start,    // START level
  input  logic               stop,     // STOP level
  output logic [SR_BITS-1:0] sr        // thermometer: number of ones = periods counted
);
  timeunit 1ps;
  timeprecision 1fs;

  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n)             sr <= '0;
    else if (start && !stop) sr <= {sr[SR_BITS-2:0], 1'b1};
  end

  // The contents stay a thermometer code: once a bit is 1, all lower bits are 1.
  a_thermo: assert property (@(posedge ref_clk) disable iff (!rst_n)
                             ((sr + 1'b1) & sr) == '0)
    else $error("tdc_shift_reg: contents are not a thermometer code");
endmodule
