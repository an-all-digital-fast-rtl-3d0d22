// updn_counter: saturating up/down counter holding one calibration word B_i.
//
// On each rising edge of clk, while en (FINISH) is high, the word steps +1 on
// up or -1 on dn and stops at 0 and at full scale. The detectors never raise
// up and dn together; lock is expressed by both being low. Reset loads
// mid-scale (B_INIT) so the fine delay can move either way.
// Counting on UP/DN and freezing on lock follow the design; the reset value,
// saturation and priority of up over dn are this implementation's choices.
module updn_counter #(
  parameter int unsigned       B_BITS = dll_pkg::B_BITS,
  parameter logic [B_BITS-1:0] B_INIT = B_BITS'(1 << (B_BITS - 1))
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              up,
  input  logic              dn,
  output logic [B_BITS-1:0] q
);
  timeunit 1ps; timeprecision 1ps;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) q <= B_INIT;
    else if (en) begin
      if (up && (q != '1))      q <= q + 1'b1;
      else if (!up && dn && (q != '0)) q <= q - 1'b1;
    end
endmodule
