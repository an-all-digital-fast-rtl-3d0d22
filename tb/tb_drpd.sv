// tb_drpd: checks the relative phase detector and its interpolators.
//
// Three phases P_(i-1), P_i, P_(i+1) of a 2000 ps clock are generated with
// stage delays theta1 (P_(i-1)->P_i) and theta2 (P_i->P_(i+1)). The error of
// P_i against the middle of its neighbours is e = (theta1 - theta2)/2.
// Expected, with pe = theta2 - theta1 = -2e and W = 2*floor(QE/2): up when
// pe > W, dn when pe < -W, lock otherwise (values on the
// window edge are avoided). The hetero-interpolated sample clock must rise at
// the mean of the neighbour edges plus T_homo = 300 + 250*sel ps, or with the
// later neighbour when half their spacing exceeds T_homo (out of range). With the
// enable low the sample clock must stop and the outputs hold. Decisions are
// checked only where the chosen range keeps the interpolator in range.
module tb_drpd;
  timeunit 1ps; timeprecision 1ps;

  localparam int T = 2000, QE = 7;
  localparam int W = 2 * (QE / 2);   // window on theta_(i+1) - theta_i

  logic p_prev = 1'b0, p_mid = 1'b0, p_next = 1'b0;
  logic en = 1'b0, rst_n = 1'b0;
  logic [1:0] sel = 2'd1;
  logic up, dn, lock, sample_clk;
  int th1 = 400, th2 = 400;
  int checks = 0, failures = 0;
  time t_lead;

  drpd dut (.*);

  always begin
    t_lead = $time;
    p_prev = 1'b1;
    fork
      begin automatic int d = th1; repeat (d) #1; p_mid = 1'b1; end
      begin automatic int d = th1 + th2; repeat (d) #1; p_next = 1'b1; end
    join_none
    repeat (T / 2) #1;
    p_prev = 1'b0;
    fork
      begin automatic int d = th1; repeat (d) #1; p_mid = 1'b0; end
      begin automatic int d = th1 + th2; repeat (d) #1; p_next = 1'b0; end
    join_none
    repeat (T / 2) #1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    automatic int n_up = 0, n_dn = 0, n_lock = 0;
    repeat (3 * T) #1;
    rst_n = 1'b1;
    en = 1'b1;
    for (int n = 0; n < 60; n++) begin
      automatic int e2;
      automatic time ts;
      th1 = 300 + int'($urandom_range(200));
      th2 = 300 + int'($urandom_range(200));
      if (n < 4) th2 = th1 + 2 * (n - 2);      // small errors around zero
      if ((th1 + th2) % 2 != 0) th2 += 1;      // keep the middle on a whole ps
      e2 = th1 - th2;                          // twice the error
      if (e2 == W || e2 == -W) th2 += 2;
      e2 = th1 - th2;
      sel = 2'($urandom_range(3));
      repeat (3) @(posedge p_prev);
      @(posedge sample_clk);
      ts = $time;
      #1;
      begin
        automatic int th = 300 + 250 * int'(sel) - (th1 + th2) / 2;
        automatic int exp_t = th1 + th2 + ((th < 0) ? 0 : th);   // whole ps: th1+th2 kept even
        check(int'(ts - t_lead) == exp_t,
            $sformatf("sample clock at %0d expected %0d", int'(ts - t_lead), exp_t));
      end
      if (300 + 250 * int'(sel) > (th1 + th2) / 2) begin
      check(up == (e2 < -W), $sformatf("up=%0b th1=%0d th2=%0d", up, th1, th2));
      check(dn == (e2 >  W), $sformatf("dn=%0b th1=%0d th2=%0d", dn, th1, th2));
      check(lock == (e2 > -W && e2 < W), $sformatf("lock=%0b th1=%0d th2=%0d", lock, th1, th2));
      end
      if (up) n_up++;
      if (dn) n_dn++;
      if (lock) n_lock++;
    end
    check(n_up > 0 && n_dn > 0 && n_lock > 0, "all three decisions seen");
    // disable: outputs hold, sample clock stops
    begin
      automatic logic h_up = up, h_dn = dn, h_lock = lock, h_s;
      en = 1'b0;
      repeat (2) @(posedge p_prev);
      h_s = sample_clk;
      th1 = 300; th2 = 500;
      repeat (5) @(posedge p_prev);
      check(sample_clk == h_s && up == h_up && dn == h_dn && lock == h_lock, "hold while disabled");
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
