// adscm_dll: all-digital fast-lock self-calibrated five-phase DLL.
//
// The reference clock runs through a five-stage delay line; the stage
// outputs P1..P5 are five clock phases meant to be spaced exactly T_REF/5.
// Two loops share the line:
//  1. Lock-in: with calibration off, a bang-bang phase detector compares P5
//     with the reference and the unbalanced-binary-search lock-in unit sets
//     the common coarse word C[4:0] so that the line delay is one reference
//     period. A judge step first checks whether T_REF exceeds twice the
//     minimum line delay and, if not, starts the search lower, which avoids
//     harmonic lock. LOCKED rises after 14 reference periods (12 when the
//     judge skips a step) and C is then frozen.
//  2. Calibration: with LOCKED high the lock detect unit raises FINISH and
//     the calibration unit trims each stage's fine word B_i[3:0] so that
//     every phase sits midway between its neighbours (rapid self-calibration)
//     while stage 5 keeps P5 on the reference edge. When all five detectors
//     report lock for two reference cycles FINISH falls and the words freeze.
// Interface: ref_clk and the active-low reset rst_n; mismatch_ps is a
// simulation input of the delay-line model that emulates per-stage process
// variation (tie to zero for a nominal line). Outputs are the phases, the
// control words and the status flags. The control logic is synthesizable;
// the delay line and phase detectors are timing models.
module adscm_dll
  import dll_pkg::*;
(
  input  logic                ref_clk,
  input  logic                rst_n,
  input  mismatch_t           mismatch_ps [N_STAGES],
  output logic [N_STAGES-1:0] p,
  output logic [C_BITS-1:0]   c_word,
  output b_words_t            b_word,
  output logic                locked,
  output logic                finish,
  output logic                ps,
  output logic                pd_lead,
  output logic                pd_lock,
  output logic [N_STAGES-1:0] cal_lock
);
  timeunit 1ps; timeprecision 1ps;

  logic [1:0] range_sel;

  dcdl u_dcdl (
    .in_clk     (ref_clk),
    .c_word     (c_word),
    .b_word     (b_word),
    .mismatch_ps(mismatch_ps),
    .p          (p)
  );

  phase_detector #(.QE_PS(QE_PS)) u_pd (
    .ref_clk(ref_clk),
    .out_clk(p[N_STAGES-1]),
    .rst_n  (rst_n),
    .lead   (pd_lead),
    .lock   (pd_lock)
  );

  lockin_unit #(.C_BITS(C_BITS), .SKIP(SKIP)) u_lockin (
    .ref_clk  (ref_clk),
    .out_clk  (p[N_STAGES-1]),
    .rst_n    (rst_n),
    .lead     (pd_lead),
    .c_word   (c_word),
    .locked   (locked),
    .ps       (ps),
    .range_sel(range_sel)
  );

  calibration_unit u_cal (
    .ref_clk(ref_clk),
    .p      (p),
    .rst_n  (rst_n),
    .locked (locked),
    .sel    (range_sel),
    .b_word (b_word),
    .finish (finish),
    .lock_i (cal_lock)
  );
endmodule
