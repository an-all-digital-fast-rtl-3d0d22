// tb_updn_counter: checks the saturating calibration counter against a
// reference count kept in the testbench: reset to mid-scale, +1 on up, -1 on
// dn, hold when disabled or when neither is set, saturation at 0 and 15.
module tb_updn_counter;
  timeunit 1ps; timeprecision 1ps;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, up = 1'b0, dn = 1'b0;
  logic [3:0] q;
  int model;
  int checks = 0, failures = 0;

  updn_counter dut (.*);

  always begin
    repeat (50) #1;
    clk = ~clk;
  end

  initial begin
    repeat (3) @(posedge clk);
    checks++;
    if (q != 4'd8) begin failures++; $display("FAIL reset value %0d", q); end
    model = 8;
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      en = ($urandom_range(9) != 0);
      // long runs of one direction reach both limits
      if (n < 200) begin up = (n % 40) < 30; dn = !up; end
      else begin
        up = 1'($urandom_range(1));
        dn = up ? 1'b0 : 1'($urandom_range(1));
      end
      @(posedge clk);
      if (en && up && model < 15) model++;
      else if (en && dn && model > 0) model--;
      #1;
      checks++;
      if (int'(q) != model) begin
        failures++;
        $display("FAIL q=%0d model=%0d", q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) #1;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
