// interpolator: behavioural model of the wide-range phase interpolator.
//
// The output switches to a level once both inputs have reached it, at the
// mean of the two input edge times plus the intrinsic delay T_homo:
//     T_hetero = T_homo + T_diff / 2
// For a homo-interpolator both inputs are the same signal and the delay is
// T_homo. If T_diff/2 exceeds T_homo the precise ratio is lost and the edge
// follows the later input immediately (the range limit of a plain
// interpolator). The range bits sel (S1,S0) switch in load capacitance:
// T_homo = TH_BASE_PS + sel * TH_STEP_PS, so slower clocks with larger phase
// spacing stay within range. OFFSET_PS adds a fixed skew (used to build the
// quantisation window of the relative phase detector). Output edges are
// placed to the half picosecond, so a mean of two whole-picosecond edges is
// exact. While en is low the
// output holds its level and nothing toggles. The interpolation law follows
// the design; the capacitor steps and offsets are this model's choice.
// Not synthesizable: a timing model of an analog cell.
module interpolator #(
  parameter int unsigned TH_BASE_PS = 300,
  parameter int unsigned TH_STEP_PS = 250,
  parameter int          OFFSET_PS  = 0
) (
  input  logic       a,
  input  logic       b,
  input  logic       en,
  input  logic [1:0] sel,
  output logic       y
);
  timeunit 1ps; timeprecision 100fs;

  time  ta, tb;       // last change time of each input
  logic a_q, b_q;      // last seen input levels
  logic y_tgt;         // level the output is heading for

  initial begin
    y     = 1'b0;
    y_tgt = 1'b0;
    a_q   = 1'b0;
    b_q   = 1'b0;
    ta    = 0;
    tb    = 0;
  end

  always @(a or b) begin
    automatic time  now = $time;
    automatic time  t_first;
    automatic int   d2;   // delay in half picoseconds
    automatic logic v;
    if (a != a_q) begin ta = now; a_q = a; end
    if (b != b_q) begin tb = now; b_q = b; end
    if (en && (a == b) && (a != y_tgt)) begin
      v       = a;
      y_tgt   = v;
      t_first = (ta < tb) ? ta : tb;
      d2 = 2 * (int'(TH_BASE_PS) + int'(sel) * int'(TH_STEP_PS) + OFFSET_PS) - int'(now - t_first);
      if (d2 < 0) d2 = 0;
      fork
        begin
          repeat (d2 / 2) #1;
          if (d2 % 2 != 0) #0.5;
          y = v;
        end
      join_none
    end
  end
endmodule
