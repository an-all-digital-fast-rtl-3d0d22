// phase_detector: bang-bang phase detector between the reference clock and
// the delay-line output (behavioural model).
//
// lead is a flip-flop that samples out_clk on the rising edge of ref_clk: it
// is 1 when the output edge has already arrived, i.e. the line is too short
// and the controller should add delay, and 0 when the output lags. This
// reading is valid while the line delay lies between 0.5 and 1.5 reference
// periods, which the lock-in search guarantees.
// lock models the resolution limit of the real detector, whose two
// flip-flops go metastable when the edges nearly coincide: it is 1 when the
// nearest output rising edge lies within QE_PS of the reference rising edge.
// lock is updated QE_PS+1 ps after each reference edge, lead on the edge.
// The sense of lead follows the design; the explicit aperture window (a
// measurement on edge times, hence not synthesizable) is this model's way of
// reproducing the metastability dead zone. rst_n clears both outputs.
module phase_detector #(
  parameter int unsigned QE_PS = 7
) (
  input  logic ref_clk,
  input  logic out_clk,
  input  logic rst_n,
  output logic lead,
  output logic lock
);
  timeunit 1ps; timeprecision 1ps;

  time t_out;

  always_ff @(posedge ref_clk or negedge rst_n)
    if (!rst_n) lead <= 1'b0;
    else        lead <= out_clk;

  initial t_out = 0;
  always @(posedge out_clk) t_out = $time;

  always @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) begin
      lock = 1'b0;
    end else begin
      automatic time t_ref = $time;
      repeat (QE_PS + 1) #1;
      if (!rst_n)                               lock = 1'b0;
      else if (t_out >= t_ref)                  lock = (t_out - t_ref) <= time'(QE_PS);
      else                                      lock = (t_ref - t_out) <= time'(QE_PS);
    end
  end
endmodule
