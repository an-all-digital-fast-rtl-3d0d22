// single_bit_gen: one bit of the binary-search control word.
//
// On each trigger edge: if the bit's own step is being entered the bit is
// set to 1 (the guess); if its step is being left the bit takes LEAD
// (1 = the line is still too short, keep the 1; 0 = too long, clear it);
// otherwise it holds. A bit whose step is skipped stays at its reset value 0.
// The three data sources (step signals, LEAD, own output) follow the design;
// the priority between them is this implementation's choice.
module single_bit_gen (
  input  logic clk,
  input  logic rst_n,
  input  logic enter,   // step S_i is entered at this edge
  input  logic active,  // step S_i is the current step
  input  logic lead,
  output logic q
);
  timeunit 1ps; timeprecision 1ps;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      q <= 1'b0;
    else if (enter)  q <= 1'b1;
    else if (active) q <= lead;
endmodule
