// Shared constants of the 25 ps time-to-digital converter.
//
// The converter measures the time between a START and a STOP edge. A delay-locked
// loop spreads one 1.25 GHz clock (800 ps period) into 32 phases 25 ps apart. Each
// input is sampled by 32 samplers, one per phase, which gives the fine part of the
// time in 25 ps steps; a 5-bit shift register counts whole reference periods for the
// coarse part. These numbers (32 phases, 25 ps, 800 ps, 5 bits, 500 ps capture delay,
// 425 ps stage delay, 19 delay stages) are the ones of the design; the derived widths
// below are this implementation's.
package tdc_pkg;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned NUM_PHASES    = 32;   // sampling clocks
  localparam int unsigned CODE_W        = $clog2(NUM_PHASES);  // 5-bit fine code
  localparam int unsigned SR_BITS       = 5;    // coarse shift register length
  localparam int unsigned LSB_PS        = 25;   // fine resolution
  localparam int unsigned REF_PERIOD_PS = 800;  // 1.25 GHz reference period
  localparam real         CAPTURE_DELAY_PS = 500.0;  // START/STOP to register clock
  localparam real         STAGE_DELAY_PS   = 425.0;  // half period + one LSB
  localparam int unsigned DLL_STAGES    = 19;   // 17 active + 2 dummy stages
endpackage
