// dcdl: behavioural model of the five-stage digitally controlled delay line.
//
// Stage i is a coarse delay element driven by the shared lock-in word C
// followed by a fine delay element driven by its own calibration word B_i;
// the output of stage i is phase P_i (p[i-1]). With the default constants a
// stage spans about 150..553 ps of coarse delay in 13 ps steps (the whole
// line 0.75..2.77 ns in 65 ps steps) plus 0..60 ps of fine delay in 4 ps
// steps; at mid-scale B the line runs about 0.91..2.93 ns. mismatch_ps adds a
// fixed signed offset per stage to emulate process variation.
// The two-element stage and the 65 ps average coarse step and 4 ps fine step
// follow the design; the linear delay law and the per-stage split are this
// model's choice. Not synthesizable: a timing model of an analog line.
module dcdl
  import dll_pkg::*;
#(
  parameter int unsigned T_STAGE_MIN_PS = 150,
  parameter int unsigned T_C_STEP_PS    = 13,
  parameter int unsigned T_B_STEP_PS    = 4
) (
  input  logic              in_clk,
  input  logic [C_BITS-1:0] c_word,
  input  b_words_t          b_word,
  input  mismatch_t         mismatch_ps [N_STAGES],
  output logic [N_STAGES-1:0] p
);
  timeunit 1ps; timeprecision 1ps;

  logic [N_STAGES:0]   chain;   // chain[0] = input, chain[i+1] = P_(i+1)
  logic [N_STAGES-1:0] mid;     // between coarse and fine element

  assign chain[0] = in_clk;

  for (genvar i = 0; i < N_STAGES; i++) begin : g_stage
    lade #(.CTRL_BITS(C_BITS), .T_MIN_PS(T_STAGE_MIN_PS), .T_STEP_PS(T_C_STEP_PS)) u_coarse (
      .in_clk  (chain[i]),
      .ctrl    (c_word),
      .extra_ps(int'(mismatch_ps[i])),
      .out_clk (mid[i])
    );
    lade #(.CTRL_BITS(B_BITS), .T_MIN_PS(0), .T_STEP_PS(T_B_STEP_PS)) u_fine (
      .in_clk  (mid[i]),
      .ctrl    (b_word[i]),
      .extra_ps(0),
      .out_clk (chain[i+1])
    );
  end

  assign p = chain[N_STAGES:1];
endmodule
