// tb_lock_detect_unit: checks FINISH = LOCKED xor (all LOCK_i high on the
// last two reference edges), against a reference model kept here, for random
// lock patterns with long all-locked runs.
module tb_lock_detect_unit;
  timeunit 1ps; timeprecision 1ps;

  logic ref_clk = 1'b0, rst_n = 1'b0, locked = 1'b0;
  logic [4:0] lock_i = '0;
  logic finish;
  bit h1 = 0, h2 = 0;   // all-lock history at the last two edges
  int checks = 0, failures = 0;
  int n_on = 0, n_off = 0;

  lock_detect_unit dut (.*);

  always begin
    repeat (500) #1;
    ref_clk = ~ref_clk;
  end

  initial begin
    repeat (2) @(posedge ref_clk);
    @(negedge ref_clk) rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      @(negedge ref_clk);
      locked = (n >= 20);
      if ((n / 10) % 3 == 2) lock_i = '1;
      else lock_i = 5'($urandom);
      @(posedge ref_clk);
      h2 = h1 && (&lock_i);
      h1 = &lock_i;
      #1;
      checks++;
      if (finish != (locked ^ h2)) begin
        failures++;
        $display("FAIL n=%0d finish=%0b", n, finish);
      end
      if (locked && finish) n_on++;
      if (locked && !finish) n_off++;
    end
    checks++;
    if (n_on == 0 || n_off == 0) begin failures++; $display("FAIL: enable and disable not both seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge ref_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
