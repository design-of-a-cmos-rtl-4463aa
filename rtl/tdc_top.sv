// Time-to-digital converter with 25 ps resolution: top level.
//
// Measures the time from a rising edge on start to a rising edge on stop, up to
// 4.775 ns, in 25 ps steps. The clock generator makes 32 phases of a 1.25 GHz clock,
// 25 ps apart. The START block and the STOP block each sample their input with all 32
// phases, store the sampler outputs 500 ps after the edge (the input delayed by a
// buffer chain), keep the first sampler that went high and encode it as a 5-bit value:
// the number of 25 ps steps from the edge to the next reference edge. The shift
// register counts the reference periods between the two edges. The output block
// computes
//   interval = periods * 800 ps + (START value - STOP value) * 25 ps.
//
// Use: pulse dll_rst_n low once and wait about 400 clk_in cycles for the loop to
// settle. For each measurement hold rst_n low briefly with start and stop low, then
// raise start, then stop, and keep both high. 500 ps after stop rises, valid goes
// high and the outputs hold the result until the next rst_n pulse. sr_full warns that
// the interval may exceed the 4.775 ns range. The block structure follows the design;
// the two resets, valid and sr_full are this implementation's. The clock generator and
// the delay buffers are behavioural models, the rest is synthesizable.
module tdc_top #(
  parameter int unsigned NUM_PHASES       = tdc_pkg::NUM_PHASES,
  parameter int unsigned SR_BITS          = tdc_pkg::SR_BITS,
  parameter int unsigned LSB_PS           = tdc_pkg::LSB_PS,
  parameter int unsigned REF_PERIOD_PS    = tdc_pkg::REF_PERIOD_PS,
  parameter real         CAPTURE_DELAY_PS = tdc_pkg::CAPTURE_DELAY_PS,
  localparam int unsigned W     = $clog2(NUM_PHASES),
  localparam int unsigned LSB_W = $clog2(SR_BITS * NUM_PHASES + NUM_PHASES) + 1,
  localparam int unsigned PS_W  = $clog2(SR_BITS * REF_PERIOD_PS + REF_PERIOD_PS) + 1
) (
  input  logic                    clk_in,        // 1.25 GHz input clock
  input  logic                    dll_rst_n,     // restarts the clock generator's loop
  input  logic                    rst_n,         // clears the measurement, active low
  input  logic                    start,         // START
  input  logic                    stop,          // STOP
  output logic                    ref_clk,       // reference clock (phase 0)
  output logic [W-1:0]            start_code,    // START digital value
  output logic [W-1:0]            stop_code,     // STOP digital value
  output logic [SR_BITS-1:0]      shift_reg,     // coarse count, thermometer code
  output logic signed [LSB_W-1:0] interval_lsb,  // interval in 25 ps steps
  output logic signed [PS_W-1:0]  interval_ps,   // interval in ps
  output logic                    valid,         // both edges captured
  output logic                    sr_full        // coarse count saturated
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [NUM_PHASES-1:0] phase;
  real                   vctrl;
  logic                  start_dly, stop_dly;
  logic                  start_cap, stop_cap;

  tdc_mpcg #(.N(NUM_PHASES)) u_mpcg (
    .clk_in(clk_in), .rst_n(dll_rst_n), .phase(phase), .ref_clk(ref_clk), .vctrl(vctrl));

  tdc_delay_buf #(.DELAY_PS(CAPTURE_DELAY_PS)) u_dly_start (.in(start), .out(start_dly));
  tdc_delay_buf #(.DELAY_PS(CAPTURE_DELAY_PS)) u_dly_stop  (.in(stop),  .out(stop_dly));

  tdc_channel #(.N(NUM_PHASES)) u_start_blk (
    .phase(phase), .sig(start), .sig_dly(start_dly), .rst_n(rst_n),
    .code(start_code), .captured(start_cap));

  tdc_channel #(.N(NUM_PHASES)) u_stop_blk (
    .phase(phase), .sig(stop), .sig_dly(stop_dly), .rst_n(rst_n),
    .code(stop_code), .captured(stop_cap));

  tdc_shift_reg #(.SR_BITS(SR_BITS)) u_sr (
    .ref_clk(ref_clk), .rst_n(rst_n), .start(start), .stop(stop), .sr(shift_reg));

  tdc_dsp #(.SR_BITS(SR_BITS), .N(NUM_PHASES), .LSB_PS(LSB_PS), .REF_PERIOD_PS(REF_PERIOD_PS)) u_dsp (
    .sr(shift_reg), .start_code(start_code), .stop_code(stop_code),
    .interval_lsb(interval_lsb), .interval_ps(interval_ps), .sr_full(sr_full));

  assign valid = start_cap & stop_cap;
endmodule
