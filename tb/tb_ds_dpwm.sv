// tb_ds_dpwm: for random duty words the high time summed over 2**DS_W = 4
// periods of 64 clocks equals the duty word exactly (256 clocks total), and
// every single period's on-time is duty/4 rounded down or up.
module tb_ds_dpwm;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] duty = '0;
  logic pwm, period_start;
  int checks = 0, failures = 0;

  ds_dpwm dut (.clk, .rst_n, .duty, .pwm, .period_start);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 40; t++) begin
      int total, per;
      duty = (t < 3) ? 8'(t * 127) : 8'($urandom);
      // let the new duty take effect and the accumulator start a fresh cycle
      do @(negedge clk); while (!period_start);
      repeat (4 * 64) @(negedge clk);
      do @(negedge clk); while (!period_start);
      // align to an accumulator cycle: measure 4 periods
      total = 0;
      for (int p = 0; p < 4; p++) begin
        per = 0;
        for (int c = 0; c < 64; c++) begin
          if (pwm) per++;
          @(negedge clk);
        end
        check(per == duty / 4 || per == duty / 4 + 1, $sformatf("period on-time %0d for duty %0d", per, duty));
        total += per;
      end
      check(total == duty, $sformatf("4-period on-time %0d for duty %0d", total, duty));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
