// tb_phase_detector: checks the bang-bang phase detector.
//
// A reference clock of 1000 ps and a copy delayed by a programmed amount are
// applied. For delays between 0.5 and 1 period the output leads the next
// reference edge and lead must be 1; between 1 and 1.5 periods it lags and
// lead must be 0. lock must be 1 exactly when the output edge is within
// QE_PS of a reference edge. Expected values come from the programmed delay.
module tb_phase_detector;
  timeunit 1ps; timeprecision 1ps;

  localparam int T = 1000;
  localparam int QE = 7;

  logic ref_clk = 1'b0, out_clk = 1'b0, rst_n = 1'b0;
  logic lead, lock;
  int delay = 800;
  int checks = 0, failures = 0;

  phase_detector #(.QE_PS(QE)) dut (.*);

  always begin
    repeat (T / 2) #1;
    ref_clk = ~ref_clk;
  end

  always @(ref_clk) begin
    automatic logic v = ref_clk;
    automatic int d = delay;
    fork begin repeat (d) #1; out_clk = v; end join_none
  end

  localparam int ND = 10;
  localparam int DELAYS [ND] = '{600, 800, 990, 992, 995, 1000, 1005, 1007, 1010, 1400};

  initial begin
    repeat (3) @(posedge ref_clk);
    rst_n = 1'b1;
    for (int n = 0; n < ND; n++) begin
      delay = DELAYS[n];
      repeat (4) @(posedge ref_clk);
      repeat (QE + 5) #1;
      checks++;
      if (delay != T && lead != (delay < T)) begin
        failures++;
        $display("FAIL lead=%0b at delay %0d", lead, delay);
      end
      checks++;
      if (lock != ((delay >= T - QE) && (delay <= T + QE))) begin
        failures++;
        $display("FAIL lock=%0b at delay %0d", lock, delay);
      end
    end
    rst_n = 1'b0;
    #1;
    checks++;
    if (lead || lock) begin failures++; $display("FAIL reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) @(posedge ref_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
