// lock_detect_unit: turns the calibration loop on after lock-in and off once
// every stage is calibrated.
//
// all_lock is the AND of the per-stage LOCK_i flags. Two flip-flops clocked by
// the reference form a two-cycle filter: done is high only when all_lock was
// high on two consecutive reference edges. FINISH = LOCKED xor done, so
// FINISH rises with LOCKED (calibration runs) and falls when all stages have
// stayed inside the quantisation window for two reference cycles; FINISH then
// gates the counters, detectors and interpolators off.
// The gate network follows the design; the flip-flop reset is this
// implementation's choice.
module lock_detect_unit #(
  parameter int unsigned N_STAGES = dll_pkg::N_STAGES
) (
  input  logic                ref_clk,
  input  logic                rst_n,
  input  logic [N_STAGES-1:0] lock_i,
  input  logic                locked,
  output logic                finish
);
  timeunit 1ps; timeprecision 1ps;

  logic all_lock, ff1, done;

  assign all_lock = &lock_i;

  always_ff @(posedge ref_clk or negedge rst_n)
    if (!rst_n) begin
      ff1  <= 1'b0;
      done <= 1'b0;
    end else begin
      ff1  <= all_lock;
      done <= all_lock & ff1;
    end

  assign finish = locked ^ done;
endmodule
