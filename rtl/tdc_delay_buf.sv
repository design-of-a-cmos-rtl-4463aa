// Behavioural model (not synthesizable): the buffer chain that delays START or STOP
// by 500 ps before it clocks the register block.
//
// In silicon this is a chain of inverters sized for 500 ps; here every change of the
// input reappears at the output DELAY_PS later (transport delay, so no pulse is
// swallowed). The output starts low. The 500 ps value is the design's; it places the
// snapshot after 20 of the 32 samplers have seen the edge.
module tdc_delay_buf #(
  parameter real DELAY_PS = tdc_pkg::CAPTURE_DELAY_PS
) (
  input  logic in,
  output logic out
);
  timeunit 1ps;
  timeprecision 1fs;

  initial out = 1'b0;

  always @(posedge in or negedge in) begin
    automatic logic v = in;
    fork
      #(DELAY_PS) out <= v;
    join_none
  end
endmodule
