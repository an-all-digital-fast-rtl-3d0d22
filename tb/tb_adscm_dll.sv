// tb_adscm_dll: end-to-end test of the five-phase DLL at its default sizes.
//
// For each reference period in the list the testbench resets the DLL with a
// fixed per-stage delay mismatch, then checks:
//  * LOCKED rises exactly 14 reference periods after reset when T_REF is above
//    twice the minimum line delay and 12 otherwise (judge result ps agrees);
//  * at LOCKED the word C is the one a binary search over the nominal line
//    model must find, worked out here from the line's delay formula;
//  * FINISH rises with LOCKED and falls again within MAX_CAL_CYCLES;
//  * afterwards P5 sits within the detector window of the reference edge and
//    every stage delay theta_i is within TOL_PS (the bound the detector
//    windows allow) of T_REF/5, measured from
//    edge times;
//  * the words stay frozen after FINISH falls.
// It counts the mechanisms exercised (search with and without skip,
// calibration up and down steps, calibration finish) and fails if one never
// happened. Delay constants mirror the delay-line model's defaults.
module tb_adscm_dll;
  timeunit 1ps; timeprecision 1ps;
  import dll_pkg::*;

  localparam int T_MIN_STAGE = 150, T_C_STEP = 13, T_B_STEP = 4;
  localparam int MAX_CAL_CYCLES = 120;
  // Each relative detector accepts |theta_(i+1) - theta_i| up to
  // W = 2*floor(QE_PS/2); over the chain a linear ramp of such differences
  // puts an end stage up to 2*W from the mean, plus one fine step.
  localparam int TOL_PS = 4 * int'(QE_PS / 2) + T_B_STEP;
  localparam int NP = 4;
  localparam int PERIODS [NP] = '{2900, 1000, 2000, 1250};

  logic ref_clk = 1'b0, rst_n = 1'b0;
  mismatch_t mismatch_ps [N_STAGES];
  logic [N_STAGES-1:0] p;
  logic [C_BITS-1:0] c_word;
  b_words_t b_word;
  logic locked, finish, ps, pd_lead, pd_lock;
  logic [N_STAGES-1:0] cal_lock;

  int checks = 0, failures = 0;
  int n_skip = 0, n_noskip = 0, n_up = 0, n_dn = 0, n_finish = 0;
  int half = 500;
  bit run_clk = 1'b0;

  adscm_dll dut (.*);

  always begin
    if (run_clk) begin
      repeat (half) #1;
      ref_clk = ~ref_clk;
    end else #1;
  end


  // count calibration steps
  b_words_t b_prev;
  always @(b_word) begin
    for (int i = 0; i < N_STAGES; i++) begin
      if (b_word[i] > b_prev[i]) n_up++;
      if (b_word[i] < b_prev[i]) n_dn++;
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

  // nominal line delay for a word, all B at mid-scale, no mismatch
  function automatic int line_delay(input int c);
    return N_STAGES * (T_MIN_STAGE + c * T_C_STEP + int'(B_INIT) * T_B_STEP);
  endfunction

  // reference model of the unbalanced binary search on the nominal line
  function automatic int expect_c(input int tref, output bit skip);
    int c = 0;
    skip = !(line_delay(0) < tref / 2);
    for (int k = (skip ? int'(SKIP) : 0); k < int'(C_BITS); k++) begin
      int bitv = C_BITS - 1 - k;
      int trial = c | (1 << bitv);
      if (line_delay(trial) < tref) c = trial;   // output still leads
    end
    return c;
  endfunction

  initial begin
    for (int i = 0; i < N_STAGES; i++) mismatch_ps[i] = '0;
    b_prev = dut.b_word;
    for (int n = 0; n < NP; n++) begin
      automatic int tref = PERIODS[n];
      automatic int cyc;
      automatic bit skip;
      automatic int c_exp;
      // mismatch: +/- up to ~20 ps per stage, zero-sum free
      for (int i = 0; i < N_STAGES; i++)
        mismatch_ps[i] = mismatch_t'((i * 37 + n * 11) % 41 - 20);
      c_exp = expect_c(tref, skip);
      half = tref / 2;
      rst_n = 1'b0;
      run_clk = 1'b1;
      repeat (4) @(posedge ref_clk);
      #(1);
      rst_n = 1'b1;
      cyc = 0;
      while (!locked && cyc < 40) begin
        @(posedge ref_clk);
        cyc++;
      end
      // LOCKED rises on a falling edge: cyc counts rising edges since reset
      check(cyc == (skip ? 2 * (C_BITS + 2 - SKIP) : 2 * (C_BITS + 2)),
            $sformatf("T=%0d lock cycles %0d skip=%0b", tref, cyc, skip));
      check(ps == !skip, $sformatf("T=%0d judge ps=%0b", tref, ps));
      if (skip) n_skip++; else n_noskip++;
      // C from the search; the mismatch may move it by one code
      check((int'(c_word) - c_exp) <= 1 && (c_exp - int'(c_word)) <= 1,
            $sformatf("T=%0d C=%0d expected %0d", tref, c_word, c_exp));
      check(finish, $sformatf("T=%0d FINISH not raised with LOCKED", tref));
      cyc = 0;
      while (finish && cyc < MAX_CAL_CYCLES) begin
        @(posedge ref_clk);
        cyc++;
      end
      check(!finish, $sformatf("T=%0d calibration did not finish", tref));
      if (!finish) n_finish++;
      $display("T=%0d ps: C=%0d (exp %0d) skip=%0b, calibration %0d cycles, B=%h",
               tref, c_word, c_exp, skip, cyc, b_word);
      // measure the phases over a few cycles
      repeat (3) @(posedge ref_clk);
      begin
        automatic b_words_t b_hold = b_word;
        automatic int th, worst = 0;
        automatic time t0, tprev;
        @(posedge ref_clk);
        t0 = $time;
        tprev = t0;
        for (int i = 0; i < N_STAGES; i++) begin
          @(posedge p[i]);
          th = int'($time - tprev);
          tprev = $time;
          if ((th - tref / 5) > worst) worst = th - tref / 5;
          if ((tref / 5 - th) > worst) worst = tref / 5 - th;
        end
        th = int'(tprev - t0) - tref;
        check(th <= TOL_PS && th >= -TOL_PS, $sformatf("T=%0d P5 offset %0d", tref, th));
        $display("   worst stage error %0d ps, P5 offset %0d ps", worst, th);
        check(worst <= TOL_PS, $sformatf("T=%0d stage error %0d", tref, worst));
        repeat (10) @(posedge ref_clk);
        check(b_word == b_hold, $sformatf("T=%0d words moved after FINISH", tref));
      end
    end
    check(n_skip > 0, "search with skip never ran");
    check(n_noskip > 0, "search without skip never ran");
    check(n_up > 0, "no calibration up step");
    check(n_dn > 0, "no calibration down step");
    check(n_finish > 0, "calibration never finished");
    $display("mechanisms: skip=%0d noskip=%0d up=%0d dn=%0d finish=%0d", n_skip, n_noskip, n_up, n_dn, n_finish);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) #1;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
