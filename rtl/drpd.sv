// drpd: digital relative phase detector for stage i of the calibration loop.
//
// It decides whether phase P_i lies in the middle of its neighbours P_(i-1)
// and P_(i+1), i.e. the sign of pe = theta_(i+1) - theta_i, where theta_i is
// the delay P_(i-1)->P_i. A hetero-interpolator produces i13 at the mean of
// the neighbour edges; two homo-interpolators produce copies of P_i delayed
// by the same intrinsic delay, one QE_PS/2 later (i22_late) and one QE_PS/2
// earlier (i22_early). Since P_i - mean = -pe/2, on each rising edge of i13
// two flip-flops sample:
//   u = i22_late  (pe > QE_PS: P_i early)
//   n = i22_early (pe > -QE_PS)
// up = u (lengthen stage i), dn = ~n (shorten it), lock = u xor n (inside the
// window, the two decisions differ). With whole-picosecond offsets the
// window is +/-2*floor(QE_PS/2) ps of pe (+/-6 ps for QE_PS = 7).
// While en (FINISH) is low the interpolators stop and the flip-flops hold.
// The outputs change on the rising edge of sample_clk (i13).
// The up/down/lock rule and the xor lock gate follow the design; building
// the window from two offset homo-interpolators is this implementation's
// reading of the three-interpolator detector.
module drpd #(
  parameter int unsigned QE_PS = dll_pkg::QE_PS
) (
  input  logic       p_prev,
  input  logic       p_mid,
  input  logic       p_next,
  input  logic       en,
  input  logic       rst_n,
  input  logic [1:0] sel,
  output logic       up,
  output logic       dn,
  output logic       lock,
  output logic       sample_clk
);
  timeunit 1ps; timeprecision 1ps;

  logic i13, i22_late, i22_early;
  logic u, n;

  interpolator #(.OFFSET_PS(0)) u_i13 (
    .a(p_prev), .b(p_next), .en(en), .sel(sel), .y(i13)
  );
  interpolator #(.OFFSET_PS(int'(QE_PS / 2))) u_i22_late (
    .a(p_mid), .b(p_mid), .en(en), .sel(sel), .y(i22_late)
  );
  interpolator #(.OFFSET_PS(-int'(QE_PS / 2))) u_i22_early (
    .a(p_mid), .b(p_mid), .en(en), .sel(sel), .y(i22_early)
  );

  always_ff @(posedge i13 or negedge rst_n)
    if (!rst_n) begin
      u <= 1'b0;
      n <= 1'b0;
    end else begin
      u <= i22_late;
      n <= i22_early;
    end

  assign up         = u;
  assign dn         = ~n;
  assign lock       = u ^ n;
  assign sample_clk = i13;
endmodule
