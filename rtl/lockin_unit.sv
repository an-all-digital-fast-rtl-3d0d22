// lockin_unit: unbalanced-binary-search lock-in unit (step controller plus
// binary controller).
//
// After reset the delay line is held at minimum delay for one step while the
// judge decides where the search starts, then one control bit is resolved
// per step (two reference periods) from the phase detector's LEAD, MSB
// first. LOCKED rises 2*(C_BITS+2) reference periods after reset, or
// 2*(C_BITS+2-SKIP) when the reference period is below twice the minimum
// line delay, and C stays frozen afterwards. range_sel, the two MSBs of C,
// sets the range of the calibration interpolators (a longer period means a
// larger word and larger interpolator load). The search follows the design;
// taking range_sel from C[C_BITS-1:C_BITS-2] is this implementation's choice.
module lockin_unit #(
  parameter int unsigned C_BITS = dll_pkg::C_BITS,
  parameter int unsigned SKIP   = dll_pkg::SKIP
) (
  input  logic              ref_clk,
  input  logic              out_clk,
  input  logic              rst_n,
  input  logic              lead,
  output logic [C_BITS-1:0] c_word,
  output logic              locked,
  output logic              ps,
  output logic [1:0]        range_sel
);
  timeunit 1ps; timeprecision 1ps;

  logic [C_BITS:0] step, step_next;
  logic            trig;

  step_controller #(.C_BITS(C_BITS), .SKIP(SKIP)) u_step (
    .ref_clk  (ref_clk),
    .out_clk  (out_clk),
    .rst_n    (rst_n),
    .step     (step),
    .step_next(step_next),
    .trig     (trig),
    .ps       (ps),
    .locked   (locked)
  );

  binary_controller #(.C_BITS(C_BITS)) u_bin (
    .trig     (trig),
    .rst_n    (rst_n),
    .step     (step),
    .step_next(step_next),
    .lead     (lead),
    .c_word   (c_word)
  );

  assign range_sel = c_word[C_BITS-1 -: 2];
endmodule
