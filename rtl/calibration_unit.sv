// calibration_unit: rapid self-calibration (RSC) of the five output phases.
//
// After lock-in the common word C is frozen and each stage i gets a fine
// word B_i from a saturating up/down counter:
//  * stages 1..4: a relative phase detector compares P_i with the middle of
//    P_(i-1) and P_(i+1) (P_0 is the reference), moving theta_i towards
//    (theta_i + theta_(i+1))/2;
//  * stage 5: a conventional phase detector compares P_5 with the next
//    reference edge, which keeps the whole line locked to one period.
// Lengthening stage i shifts P_i and all later phases but leaves theta_(i+1)
// unchanged, so all five stages are corrected in the same reference cycle.
// Repeated, this averaging drives every theta_i to T_REF/5.
// Counter i is clocked by a phase three stages later, P_((i+2) mod 5 + 1),
// so its detector has decided and the line has settled before B_i changes
// and the change is in place before the stage's next edge. The lock detect
// unit raises FINISH (enable) with LOCKED and drops it when all LOCK_i have
// been high for two reference cycles; counters and relative detectors then
// stop and the words stay fixed.
// The detector arrangement, counters and lock detection follow the design;
// the exact trigger phase of each counter is this implementation's choice.
module calibration_unit
  import dll_pkg::*;
(
  input  logic                ref_clk,
  input  logic [N_STAGES-1:0] p,
  input  logic                rst_n,
  input  logic                locked,
  input  logic [1:0]          sel,
  output b_words_t            b_word,
  output logic                finish,
  output logic [N_STAGES-1:0] lock_i
);
  timeunit 1ps; timeprecision 1ps;

  logic [N_STAGES-1:0] up, dn;
  logic [N_STAGES:0]   ph;     // ph[0] = reference, ph[i] = P_i

  assign ph = {p, ref_clk};

  for (genvar j = 0; j < N_STAGES - 1; j++) begin : g_drpd
    logic unused_sample;
    drpd u_drpd (
      .p_prev    (ph[j]),
      .p_mid     (ph[j+1]),
      .p_next    (ph[j+2]),
      .en        (finish),
      .rst_n     (rst_n),
      .sel       (sel),
      .up        (up[j]),
      .dn        (dn[j]),
      .lock      (lock_i[j]),
      .sample_clk(unused_sample)
    );
  end

  logic pd_lead;
  phase_detector #(.QE_PS(QE_PS)) u_pd_last (
    .ref_clk(ref_clk),
    .out_clk(p[N_STAGES-1]),
    .rst_n  (rst_n),
    .lead   (pd_lead),
    .lock   (lock_i[N_STAGES-1])
  );
  assign up[N_STAGES-1] = pd_lead & ~lock_i[N_STAGES-1];
  assign dn[N_STAGES-1] = ~pd_lead & ~lock_i[N_STAGES-1];

  for (genvar j = 0; j < N_STAGES; j++) begin : g_cnt
    updn_counter #(.B_BITS(B_BITS), .B_INIT(B_INIT)) u_cnt (
      .clk  (p[(j + 3) % N_STAGES]),
      .rst_n(rst_n),
      .en   (finish),
      .up   (up[j]),
      .dn   (dn[j]),
      .q    (b_word[j])
    );
  end

  lock_detect_unit #(.N_STAGES(N_STAGES)) u_ldu (
    .ref_clk(ref_clk),
    .rst_n  (rst_n),
    .lock_i (lock_i),
    .locked (locked),
    .finish (finish)
  );
endmodule
