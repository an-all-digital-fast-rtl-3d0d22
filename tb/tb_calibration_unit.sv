// tb_calibration_unit: checks the rapid self-calibration loop on its own.
//
// The calibration unit closes its loop through the delay-line model with
// the coarse word fixed at the value that makes the nominal line one period
// long (as lock-in would leave it) and a large per-stage mismatch. Checks:
//  * before LOCKED: FINISH low and all B_i stay at mid-scale;
//  * FINISH rises with LOCKED and the words move both up and down;
//  * FINISH falls within 150 periods, after which every theta_i is within
//    2*W+4 ps of T_REF/5 (a ramp of window-sized differences plus a step), P5 is within QE+4 ps of the reference edge, and
//    the words stay fixed.
module tb_calibration_unit;
  timeunit 1ps; timeprecision 1ps;
  import dll_pkg::*;

  localparam int TREF = 2000;
  localparam int W = 2 * int'(QE_PS / 2);   // detector window on theta_(i+1) - theta_i
  logic ref_clk = 1'b0, rst_n = 1'b0, locked = 1'b0;
  logic [N_STAGES-1:0] p;
  logic [1:0] sel = 2'd2;
  b_words_t b_word;
  logic finish;
  logic [N_STAGES-1:0] lock_i;
  mismatch_t mismatch_ps [N_STAGES];
  logic [C_BITS-1:0] c_word;
  int checks = 0, failures = 0;

  calibration_unit dut (.*);
  dcdl u_line (.in_clk(ref_clk), .c_word(c_word), .b_word(b_word), .mismatch_ps(mismatch_ps), .p(p));

  always begin
    repeat (TREF / 2) #1;
    ref_clk = ~ref_clk;
  end

  int n_up = 0, n_dn = 0;
  b_words_t b_prev = '0;
  always @(b_word) begin
    for (int i = 0; i < N_STAGES; i++) begin
      if (rst_n && b_word[i] > b_prev[i]) n_up++;
      if (rst_n && b_word[i] < b_prev[i]) n_dn++;
    end
    b_prev = b_word;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // stage delays of one reference edge
  task automatic measure(output int th [N_STAGES], output int p5_off);
    time t0, tp;
    @(posedge ref_clk);
    t0 = $time;
    tp = t0;
    for (int i = 0; i < N_STAGES; i++) begin
      @(posedge p[i]);
      th[i] = int'($time - tp);
      tp = $time;
    end
    p5_off = int'(tp - t0) - TREF;
  endtask

  initial begin
    automatic int th [N_STAGES];
    automatic int off, worst, cyc;
    automatic b_words_t b0;
    // mismatch up to +/-20 ps; C is the largest word whose nominal line is
    // shorter than one period, as the lock-in search leaves it
    mismatch_ps = '{16'sd15, -16'sd20, 16'sd8, 16'sd18, -16'sd12};
    c_word = C_BITS'((TREF / N_STAGES - 150 - 32) / 13);
    repeat (3) @(posedge ref_clk);
    rst_n = 1'b1;
    repeat (10) @(posedge ref_clk);
    check(!finish, "FINISH low before LOCKED");
    check(b_word == {N_STAGES{B_INIT}}, "words at mid-scale before LOCKED");
    @(negedge ref_clk) locked = 1'b1;
    #1;
    check(finish, "FINISH raised with LOCKED");

    cyc = 0;
    while (finish && cyc < 150) begin
      @(posedge ref_clk);
      cyc++;
    end
    check(!finish, "calibration finished");
    check(n_up > 0 && n_dn > 0, "words moved both up and down");
    $display("calibration took %0d reference cycles, B=%h", cyc, b_word);
    repeat (3) @(posedge ref_clk);
    measure(th, off);
    worst = 0;
    for (int i = 0; i < N_STAGES; i++) begin
      if (th[i] - TREF / 5 > worst) worst = th[i] - TREF / 5;
      if (TREF / 5 - th[i] > worst) worst = TREF / 5 - th[i];
    end
    $display("worst stage error %0d ps, P5 offset %0d ps", worst, off);
    check(worst <= 2 * W + 4, $sformatf("stage error %0d", worst));
    check(off <= int'(QE_PS) + 4 && off >= -int'(QE_PS) - 4, $sformatf("P5 offset %0d", off));
    b0 = b_word;
    repeat (20) @(posedge ref_clk);
    check(b_word == b0, "words frozen after FINISH");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400) @(posedge ref_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
