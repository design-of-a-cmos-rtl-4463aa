// Behavioural model (not synthesizable): charge pump and loop filter capacitor of the
// delay-locked loop.
//
// On every rising edge of clk (phi1) the pump adds STEP_V to the control voltage when
// up is high and removes it when dn is high, as a fixed charge packet on the loop
// capacitor would; the voltage is kept between 0 V and the 3.3 V supply. rst_n
// (asynchronous, active low) sets it to V_INIT. The design gives the pump and the
// capacitor only as blocks; the step size, the start voltage and the clamp are this
// model's choices. With 1 mV steps the loop settles in a few hundred cycles.
module tdc_dll_cp #(
  parameter real STEP_V = 0.001,
  parameter real V_INIT = 1.65,
  parameter real V_MAX  = 3.3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic up,
  input  logic dn,
  output real  vctrl     // control voltage, volts
);
  timeunit 1ps;
  timeprecision 1fs;

  real v;

  function automatic real clamp(real x);
    return (x > V_MAX) ? V_MAX : (x < 0.0) ? 0.0 : x;
  endfunction

  initial v = V_INIT;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n)          v <= V_INIT;
    else if (up && !dn)  v <= clamp(v + STEP_V);
    else if (dn && !up)  v <= clamp(v - STEP_V);
  end

  assign vctrl = v;
endmodule
