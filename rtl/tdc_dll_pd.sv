// Phase detector of the delay-locked loop.
//
// It compares phi1 (output of the first active stage) with phi17_b (the complement of
// the seventeenth): in lock, 16 stage delays of 425 ps are 8.5 periods, so the two
// rise together. On each rising edge of phi1 it samples phi17_b: if phi17_b is already
// high it rose early, the chain is too fast and up asks the charge pump for more
// delay; otherwise dn asks for less. This bang-bang detector is this design's choice;
// the design names a phase detector (PFD in the layout) without its circuit. It locks
// correctly for any error under half a period. Decisions are valid one phi1 cycle
// after the edge; rst_n (asynchronous, active low) forces dn.
module tdc_dll_pd (
  input  logic ref_a,   // phi1
  input  logic fb,      // phi17_b
  input  logic rst_n,
  output logic up,      // lengthen the stage delay
  output logic dn       // shorten the stage delay
);
  timeunit 1ps;
  timeprecision 1fs;

  logic early;

  always_ff @(posedge ref_a or negedge rst_n) begin
    if (!rst_n) early <= 1'b0;
    else        early <= fb;
  end

  assign up = early;
  assign dn = ~early;
endmodule
