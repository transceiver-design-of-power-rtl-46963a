// tb_backend_ctrl: every control code of the table is applied and the
// outputs measured. FCLK_HZ is reduced to 24000 so a flash period is
// 4000 / 8000 / 16000 / 32000 clocks for 6 / 3 / 1.5 / 0.75 Hz. Checks:
// buck target codes; LED dimming duty (51/128/205 of 256); LED flash period
// and on-time (20/50/80 %); motor PMOS levels and NMOS duty.
module tb_backend_ctrl;
  localparam int unsigned FCLK = 24000;
  logic clk = 1'b0, rst_n = 1'b0, con_valid = 1'b0;
  logic [4:0] con = '0;
  logic [1:0] buck_vsel;
  logic led_p_gate, led_n_gate, m2_p_gate, m2_n_gate, m3_p_gate, m3_n_gate;
  int checks = 0, failures = 0;

  backend_ctrl #(.FCLK_HZ(FCLK)) dut (.clk, .rst_n, .con_valid, .con, .buck_vsel,
    .led_p_gate, .led_n_gate, .m2_p_gate, .m2_n_gate, .m3_p_gate, .m3_n_gate);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic apply(input int c);
    @(negedge clk) con = 5'(c); con_valid = 1'b1;
    @(negedge clk) con_valid = 1'b0;
  endtask

  // High clocks of a signal over n clocks.
  task automatic count_high(input int which, input int n, output int hi);
    hi = 0;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      case (which)
        0: hi += led_p_gate;
        1: hi += led_n_gate;
        2: hi += m2_n_gate;
        default: hi += m3_n_gate;
      endcase
    end
  endtask

  localparam int DUTY [3] = '{51, 128, 205};
  localparam int PCT  [3] = '{20, 50, 80};
  localparam int PER  [4] = '{4000, 8000, 16000, 32000};

  initial begin
    int hi;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(negedge clk);
    check(!led_p_gate && !led_n_gate && !m2_p_gate && !m2_n_gate && !m3_p_gate && !m3_n_gate,
          "all off after reset");
    for (int c = 0; c < 4; c++) begin apply(c); @(negedge clk); check(buck_vsel == 2'(c), "buck target"); end
    // Dimming, steady (no flashing chosen yet): duty over 256*8 clocks.
    for (int ch = 0; ch < 2; ch++)
      for (int d = 0; d < 3; d++) begin
        apply((ch == 0 ? 4 : 14) + d);
        repeat (300) @(negedge clk);
        count_high(ch, 2048, hi);
        check(hi == DUTY[d] * 8, $sformatf("LED %0d dimming %0d%%: %0d/2048", ch, PCT[d], hi));
      end
    // Full brightness cannot be restored by a code; flashing is measured on
    // the window: use 80 % dimming and compare windows with the PWM removed
    // by counting periods with any high clock.
    for (int ch = 0; ch < 2; ch++)
      for (int f = 0; f < 4; f++)
        for (int o = 0; o < 3; o++) begin
          int periods_on;
          apply((ch == 0 ? 11 : 21) + o);
          apply((ch == 0 ? 7 : 17) + f);     // restarts the flash period
          // count 64-clock blocks with activity over one flash period
          periods_on = 0;
          for (int blk = 0; blk < PER[f] / 64; blk++) begin
            count_high(ch, 64, hi);
            if (hi > 0) periods_on++;
          end
          // window length / 64, allowing one partial block at the edge
          check(periods_on >= PER[f] * PCT[o] / 100 / 64 && periods_on <= PER[f] * PCT[o] / 100 / 64 + 2,
                $sformatf("LED %0d %0d clk period, on-time %0d%%: %0d blocks", ch, PER[f], PCT[o], periods_on));
        end
    // Motors.
    apply(24); @(negedge clk); check(m2_p_gate && !m2_n_gate, "motor s2 PMOS on");
    apply(28); @(negedge clk); check(m3_p_gate && !m3_n_gate, "motor s3 PMOS on");
    for (int d = 0; d < 3; d++) begin
      apply(29 + d); apply(25 + d);
      repeat (300) @(negedge clk);
      check(!m2_p_gate && !m3_p_gate, "motor PMOS off in NMOS mode");
      count_high(2, 2048, hi);
      check(hi == DUTY[d] * 8, $sformatf("motor s2 NMOS %0d%%: %0d", PCT[d], hi));
      count_high(3, 2048, hi);
      check(hi == DUTY[d] * 8, $sformatf("motor s3 NMOS %0d%%: %0d", PCT[d], hi));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
