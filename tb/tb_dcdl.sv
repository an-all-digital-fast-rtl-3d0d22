// tb_dcdl: checks the delay-line model (and its delay elements).
//
// Drives a 4000 ps clock, sets words C, B_i and per-stage mismatch, and
// measures the rising-edge delay from the input to each phase P_i. The
// expected delay of stage i is T_STAGE_MIN + C*13 + B_i*4 + mismatch_i ps,
// computed here from the delay law, for a set of random words.
module tb_dcdl;
  timeunit 1ps; timeprecision 1ps;
  import dll_pkg::*;

  logic in_clk = 1'b0;
  logic [C_BITS-1:0] c_word = '0;
  b_words_t b_word = '0;
  mismatch_t mismatch_ps [N_STAGES];
  logic [N_STAGES-1:0] p;
  int checks = 0, failures = 0;

  dcdl dut (.*);

  initial begin
    for (int i = 0; i < N_STAGES; i++) mismatch_ps[i] = '0;
    for (int n = 0; n < 40; n++) begin
      automatic time t0, tprev;
      automatic int exp_d;
      c_word = C_BITS'($urandom);
      for (int i = 0; i < N_STAGES; i++) begin
        b_word[i] = B_BITS'($urandom);
        mismatch_ps[i] = mismatch_t'(int'($urandom_range(40)) - 20);
      end
      if (n == 0) c_word = '0;
      if (n == 1) c_word = '1;
      repeat (4000) #1;
      in_clk = 1'b1;
      t0 = $time;
      tprev = t0;
      for (int i = 0; i < N_STAGES; i++) begin
        @(posedge p[i]);
        exp_d = 150 + int'(c_word) * 13 + int'(b_word[i]) * 4 + int'(mismatch_ps[i]);
        checks++;
        if (int'($time - tprev) != exp_d) begin
          failures++;
          $display("FAIL stage %0d delay %0d expected %0d", i, int'($time - tprev), exp_d);
        end
        tprev = $time;
      end
      repeat (4000) #1;
      in_clk = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) #1;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
