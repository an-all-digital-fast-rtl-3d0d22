// tb_lockin_unit: checks the unbalanced-binary-search lock-in unit (step
// controller, single-bit generators, binary controller).
//
// Two units run side by side on the same reference clock: the default 5-bit
// unit with one skip step, and a 9-bit unit with two skip steps. Each closes
// its loop through an ideal delay line modelled here (delay = T_MIN +
// C*T_STEP) and an ideal lead flip-flop (line output sampled on the
// reference edge). For a list of reference periods the testbench checks:
//  * the judge result ps (T_REF > 2*T_MIN);
//  * LOCKED after exactly 2*(n+2) reference periods, or 2*(n+2-s) when
//    skipping (14/12 for the 5-bit unit, 22/18 for the 9-bit unit);
//  * the first guessed word (mid-range, or 1/2^(s+1) of it when skipping),
//    e.g. 001000000 for the 9-bit unit at 3 ns;
//  * the final word equals a software binary search over the same line;
//  * the word and LOCKED hold for many periods afterwards.
module tb_lockin_unit;
  timeunit 1ps; timeprecision 1ps;

  localparam int T_MIN5 = 900,  T_STEP5 = 65;   // 5-bit line
  localparam int T_MIN9 = 2000, T_STEP9 = 16;   // 9-bit line (2..10 ns)

  logic ref_clk = 1'b0, rst_n = 1'b0;
  int half = 500;

  // 5-bit unit
  logic out5 = 1'b0, lead5 = 1'b0, locked5, ps5;
  logic [4:0] c5;
  logic [1:0] sel5;
  lockin_unit dut5 (.ref_clk(ref_clk), .out_clk(out5), .rst_n(rst_n), .lead(lead5),
                    .c_word(c5), .locked(locked5), .ps(ps5), .range_sel(sel5));
  // 9-bit unit
  logic out9 = 1'b0, lead9 = 1'b0, locked9, ps9;
  logic [8:0] c9;
  logic [1:0] sel9;
  lockin_unit #(.C_BITS(9), .SKIP(2)) dut9 (.ref_clk(ref_clk), .out_clk(out9), .rst_n(rst_n),
                    .lead(lead9), .c_word(c9), .locked(locked9), .ps(ps9), .range_sel(sel9));

  always begin
    repeat (half) #1;
    ref_clk = ~ref_clk;
  end

  always @(ref_clk) begin
    automatic logic v = ref_clk;
    automatic int d5 = T_MIN5 + int'(c5) * T_STEP5;
    automatic int d9 = T_MIN9 + int'(c9) * T_STEP9;
    fork
      begin repeat (d5) #1; out5 = v; end
      begin repeat (d9) #1; out9 = v; end
    join_none
  end

  always @(posedge ref_clk) begin
    lead5 <= out5;
    lead9 <= out9;
  end

  int checks = 0, failures = 0;
  int n_skip = 0, n_noskip = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int search(input int n, input int s_skip, input int tmin, input int tstep,
                                input int tref, output bit skip, output int first);
    int c = 0;
    skip = !(tmin < tref / 2);
    first = 1 << (n - 1 - (skip ? s_skip : 0));
    for (int k = (skip ? s_skip : 0); k < n; k++) begin
      int trial = c | (1 << (n - 1 - k));
      if (tmin + trial * tstep < tref) c = trial;
    end
    return c;
  endfunction

  // Each unit is checked only where its line can reach one period:
  // 5-bit line 0.9..2.9 ns, 9-bit line 2..10 ns.
  localparam int NP = 8;
  localparam int PERIODS [NP] = '{1000, 1500, 2000, 2900, 3000, 3333, 5000, 7990};
  localparam bit IS9 [NP]     = '{0, 0, 0, 0, 1, 1, 1, 1};

  initial begin
    for (int n = 0; n < NP; n++) begin
      automatic int tref = PERIODS[n];
      automatic bit sk5, sk9;
      automatic int f5, f9, e5, e9, cyc = 0;
      automatic int lk5 = -1, lk9 = -1;
      automatic bit first_seen5 = 0, first_seen9 = 0;
      e5 = search(5, 1, T_MIN5, T_STEP5, tref, sk5, f5);
      e9 = search(9, 2, T_MIN9, T_STEP9, tref, sk9, f9);
      half = tref / 2;
      rst_n = 1'b0;
      repeat (3) @(posedge ref_clk);
      #1 rst_n = 1'b1;
      while ((lk5 < 0 || lk9 < 0) && cyc < 40) begin
        @(posedge ref_clk);
        cyc++;
        if (!first_seen5 && c5 != 0 && !IS9[n]) begin
          first_seen5 = 1;
          check(int'(c5) == f5, $sformatf("T=%0d 5-bit first guess %b", tref, c5));
        end
        if (!first_seen9 && c9 != 0 && IS9[n]) begin
          first_seen9 = 1;
          check(int'(c9) == f9, $sformatf("T=%0d 9-bit first guess %b", tref, c9));
        end
        if (locked5 && lk5 < 0) lk5 = cyc;
        if (locked9 && lk9 < 0) lk9 = cyc;
      end
      if (!IS9[n]) begin
        check(ps5 == !sk5, $sformatf("T=%0d ps5", tref));
        check(lk5 == (sk5 ? 12 : 14), $sformatf("T=%0d 5-bit lock cycles %0d", tref, lk5));
        check(int'(c5) == e5, $sformatf("T=%0d 5-bit C=%0d expected %0d", tref, c5, e5));
        check(sel5 == c5[4:3], "range select");
        if (sk5) n_skip++; else n_noskip++;
      end else begin
        check(ps9 == !sk9, $sformatf("T=%0d ps9", tref));
        check(lk9 == (sk9 ? 18 : 22), $sformatf("T=%0d 9-bit lock cycles %0d", tref, lk9));
        check(int'(c9) == e9, $sformatf("T=%0d 9-bit C=%0d expected %0d", tref, c9, e9));
        if (sk9) n_skip++; else n_noskip++;
      end
      $display("T=%0d: 5-bit C=%0d lock %0d cyc skip %0b | 9-bit C=%0d lock %0d cyc skip %0b",
               tref, c5, lk5, sk5, c9, lk9, sk9);
      begin
        automatic logic [4:0] h5 = c5;
        automatic logic [8:0] h9 = c9;
        repeat (20) @(posedge ref_clk);
        check(c5 == h5 && c9 == h9 && locked5 && locked9, "word held after LOCKED");
      end
    end
    check(n_skip > 0 && n_noskip > 0, "both search paths used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) #1;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
