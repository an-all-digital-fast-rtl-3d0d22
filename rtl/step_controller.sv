// step_controller: step sequencer of the unbalanced binary search (UBS)
// lock-in unit.
//
// A one-hot token walks through: step 0 (judge), S0 .. S[C_BITS], LOCKED.
// In step S_k (k < C_BITS) the binary controller tries bit C[C_BITS-1-k];
// the word is final on entering S[C_BITS], and one step later LOCKED is set
// and held until reset.
// The token advances on trig, the rising edge of a divide-by-two of the
// inverted reference, so every step lasts two reference periods and control
// changes land half a period away from the phase detector's sampling edge.
// The first trigger comes on the second falling reference edge after reset.
// Judge: during step 0 the delay line is at minimum delay; a flip-flop clocked
// by the line output (out_clk) samples ref_clk. ps = 1 means ref was still
// high, so T_REF > 2*T_DCDL_MIN and the search starts at mid-range (S0).
// ps = 0 skips SKIP steps (their bits stay 0) and the search starts at
// 1/2^(SKIP+1) of the range, which keeps the line inside 0.5..1.5 T_REF and
// avoids harmonic lock.
// Lock time from reset: 2*(C_BITS+2) reference periods without skip and
// 2*(C_BITS+2-SKIP) with skip (14 and 12 for the default 5-bit/skip-1 unit).
// Structure and timing follow the design; the token encoding and the reset
// phase of the divider are this implementation's choices.
module step_controller #(
  parameter int unsigned C_BITS = dll_pkg::C_BITS,
  parameter int unsigned SKIP   = dll_pkg::SKIP
) (
  input  logic            ref_clk,
  input  logic            out_clk,
  input  logic            rst_n,
  output logic [C_BITS:0] step,       // S0..S[C_BITS], one-hot or zero
  output logic [C_BITS:0] step_next,  // step entered at the next trig
  output logic            trig,       // trigger for the binary controller
  output logic            ps,         // judge result
  output logic            locked
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned W = C_BITS + 3;  // step 0, S0..S[C_BITS], LOCKED

  logic [W-1:0] st, st_next;
  logic         div;

  // divide-by-two of the inverted reference
  always_ff @(negedge ref_clk or negedge rst_n)
    if (!rst_n) div <= 1'b1;
    else        div <= ~div;

  assign trig = div;

  // judge flip-flop, enabled in step 0 only
  always_ff @(posedge out_clk or negedge rst_n)
    if (!rst_n)     ps <= 1'b0;
    else if (st[0]) ps <= ref_clk;

  always_comb begin
    st_next = '0;
    if (st[0])          st_next[ps ? 1 : 1 + SKIP] = 1'b1;
    else if (st[W-1])   st_next[W-1] = 1'b1;
    else                st_next = st << 1;
  end

  always_ff @(posedge div or negedge rst_n)
    if (!rst_n) st <= W'(1);
    else        st <= st_next;

  assign step      = st[W-2:1];
  assign step_next = st_next[W-2:1];
  assign locked    = st[W-1];

  initial begin
    assert (SKIP < C_BITS) else $error("SKIP must be smaller than C_BITS");
  end
endmodule
