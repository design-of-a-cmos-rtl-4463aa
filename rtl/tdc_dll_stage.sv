// Behavioural model (not synthesizable): one voltage-controlled delay stage of the
// clock generator's delay chain.
//
// Each input change reappears at out after T0_PS + KD_PS_PER_V * vctrl picoseconds,
// the delay being taken when the input changes (transport delay). out_b is the
// complementary output of the differential cell. The design only says that the
// control voltage sets the stage delay, nominally 425 ps (half the 800 ps input period
// plus one 25 ps LSB); the linear curve, 375 ps + 25 ps/V, reaching 425 ps at 2.0 V,
// is this model's own choice. The output starts low.
module tdc_dll_stage #(
  parameter real T0_PS       = tdc_pkg::STAGE_DELAY_PS - 50.0,
  parameter real KD_PS_PER_V = 25.0
) (
  input  logic in,
  input  real  vctrl,   // control voltage from the loop filter, volts
  output logic out,
  output logic out_b
);
  timeunit 1ps;
  timeprecision 1fs;

  initial out = 1'b0;

  always @(posedge in or negedge in) begin
    automatic logic    v = in;
    automatic realtime d = T0_PS + KD_PS_PER_V * vctrl;
    fork
      #(d) out <= v;
    join_none
  end

  assign out_b = ~out;
endmodule
