// START block / STOP block: measures where one input edge fell within the
// reference period.
//
// Chains the sampler bunch, the register block, the MUX block and the coding block:
// the 32 samplers follow the input on the 32 phases, the 500 ps delayed input stores
// their outputs, the MUX ring keeps the first high one and the coder outputs the
// 5-bit value (LSBs from the input edge to the next reference edge). code is valid
// once captured is high, 500 ps after the input edge; rst_n re-arms the block.
module tdc_channel #(
  parameter int unsigned N = tdc_pkg::NUM_PHASES,
  localparam int unsigned W = $clog2(N)
) (
  input  logic [N-1:0] phase,     // sampling clocks
  input  logic         sig,       // START or STOP
  input  logic         sig_dly,   // the same input delayed by 500 ps
  input  logic         rst_n,     // asynchronous, active low
  output logic [W-1:0] code,      // digital value
  output logic         captured   // code is valid
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [N-1:0] smp, snap, onehot;
  logic         hit;

  tdc_sampler_bank #(.N(N)) u_bank (.phase(phase), .data_in(sig), .q(smp));
  tdc_capture_reg  #(.N(N)) u_reg  (.clk(sig_dly), .rst_n(rst_n), .d(smp), .q(snap), .captured(captured));
  tdc_first_high   #(.N(N)) u_mux  (.q(snap), .onehot(onehot));
  tdc_coder        #(.N(N)) u_code (.onehot(onehot), .code(code), .hit(hit));

  // Once a snapshot is stored the MUX ring holds exactly one high output
  // (checked on every edge of phase 0).
  a_onehot: assert property (@(posedge phase[0]) disable iff (!rst_n)
                             captured |-> ($onehot(onehot) && hit))
    else $error("tdc_channel: snapshot %b is not a single thermometer run", snap);
endmodule
