// binary_controller: C_BITS single-bit generators forming the lock-in word.
//
// Bit C[C_BITS-1-k] belongs to step S_k: it is guessed on entering S_k and
// resolved from LEAD on leaving it, so the word is resolved MSB first. All
// bits share the trigger of the step controller. Follows the design.
module binary_controller #(
  parameter int unsigned C_BITS = dll_pkg::C_BITS
) (
  input  logic              trig,
  input  logic              rst_n,
  input  logic [C_BITS:0]   step,
  input  logic [C_BITS:0]   step_next,
  input  logic              lead,
  output logic [C_BITS-1:0] c_word
);
  timeunit 1ps; timeprecision 1ps;

  for (genvar k = 0; k < C_BITS; k++) begin : g_sbg
    single_bit_gen u_sbg (
      .clk   (trig),
      .rst_n (rst_n),
      .enter (step_next[k]),
      .active(step[k]),
      .lead  (lead),
      .q     (c_word[C_BITS-1-k])
    );
  end

  // step S[C_BITS] only waits; it owns no bit
  logic unused_last;
  assign unused_last = step[C_BITS] ^ step_next[C_BITS];
endmodule
