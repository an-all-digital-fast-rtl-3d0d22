// lade: behavioural timing model of the linearly approximant delay element.
//
// The real element is a current-starved inverter whose charging current is
// the sum of binary-weighted pMOS branches, sized so that each code step adds
// an equal increment of delay. This model keeps only that intended result:
// every input edge reappears at the output after
//     T_MIN_PS + ctrl * T_STEP_PS + extra_ps
// picoseconds (transport delay: several edges may be in flight). extra_ps
// carries a fixed offset such as a process mismatch. Not synthesizable; it
// stands in for a transistor-level cell. The linear law and the constants
// are this model's choice, fitted to the delay-line curve of the design.
module lade #(
  parameter int unsigned CTRL_BITS = 5,
  parameter int unsigned T_MIN_PS  = 150,
  parameter int unsigned T_STEP_PS = 13
) (
  input  logic                 in_clk,
  input  logic [CTRL_BITS-1:0] ctrl,
  input  int                   extra_ps,
  output logic                 out_clk
);
  timeunit 1ps; timeprecision 1ps;

  initial out_clk = 1'b0;

  always @(in_clk) begin
    automatic logic v = in_clk;
    automatic int   d = int'(T_MIN_PS) + int'(ctrl) * int'(T_STEP_PS) + extra_ps;
    if (d < 0) d = 0;
    fork
      begin
        repeat (d) #1;
        out_clk = v;
      end
    join_none
  end
endmodule
