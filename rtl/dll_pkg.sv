// dll_pkg: shared sizes of the five-phase self-calibrated DLL.
//
// The delay line has five identical stages; every stage takes the common
// 5-bit lock-in (coarse) word C[4:0] and its own 4-bit calibration (fine)
// word B_i[3:0]. The quantisation window of the relative phase detectors is
// about 7 ps. Stage count and word widths follow the design; the mid-scale
// reset value of the calibration words is this implementation's choice.
package dll_pkg;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned N_STAGES = 5;   // delay stages / output phases
  localparam int unsigned C_BITS   = 5;   // lock-in control word width
  localparam int unsigned B_BITS   = 4;   // calibration control word width
  localparam int unsigned SKIP     = 1;   // steps skipped by the unbalanced search
  localparam int unsigned QE_PS    = 7;   // phase detector quantisation window (ps)
  localparam logic [B_BITS-1:0] B_INIT = B_BITS'(1 << (B_BITS - 1)); // mid-scale

  // Per-stage calibration words, stage 1 in element 0.
  typedef logic [N_STAGES-1:0][B_BITS-1:0] b_words_t;
  // Per-stage process mismatch of the delay model, signed picoseconds.
  typedef logic signed [15:0] mismatch_t;
endpackage
