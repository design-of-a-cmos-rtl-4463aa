// Output processing: combines the coarse and fine values into the interval.
//
// interval = (periods counted) * 800 ps + (START code - STOP code) * 25 ps.
// The START code is the number of 25 ps steps from START to the next reference edge
// and the STOP code the same for STOP, so their difference corrects the whole-period
// count at both ends. The period count is the number of ones in the thermometer code
// of the shift register. interval_lsb gives the result in 25 ps steps, interval_ps
// in picoseconds; both are signed. sr_full is high when the shift register is full,
// in which case the interval may lie beyond the 4.775 ns range. Combinational; the
// equation follows the design, the output widths and the full flag are this
// implementation's.
module tdc_dsp #(
  parameter int unsigned SR_BITS       = tdc_pkg::SR_BITS,
  parameter int unsigned N             = tdc_pkg::NUM_PHASES,
  parameter int unsigned LSB_PS        = tdc_pkg::LSB_PS,
  parameter int unsigned REF_PERIOD_PS = tdc_pkg::REF_PERIOD_PS,
  localparam int unsigned W     = $clog2(N),
  localparam int unsigned LSB_W = $clog2(SR_BITS * N + N) + 1,
  localparam int unsigned PS_W  = $clog2(SR_BITS * REF_PERIOD_PS + REF_PERIOD_PS) + 1
) (
  input  logic [SR_BITS-1:0]      sr,            // shift register contents
  input  logic [W-1:0]            start_code,    // START digital value
  input  logic [W-1:0]            stop_code,     // STOP digital value
  output logic signed [LSB_W-1:0] interval_lsb,  // interval in LSBs
  output logic signed [PS_W-1:0]  interval_ps,   // interval in ps
  output logic                    sr_full        // coarse count saturated
);
  timeunit 1ps;
  timeprecision 1fs;

  int periods;
  int fine;

  always_comb begin
    periods = 0;
    for (int i = 0; i < int'(SR_BITS); i++) periods += int'(sr[i]);
    fine         = int'(start_code) - int'(stop_code);
    interval_lsb = LSB_W'(periods * int'(N) + fine);
    interval_ps  = PS_W'(periods * int'(REF_PERIOD_PS) + fine * int'(LSB_PS));
  end

  assign sr_full = sr[SR_BITS-1];
endmodule
