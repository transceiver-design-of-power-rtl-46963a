// tb_johnson_clkgen: each phase is a 50 % square wave of period 6 clocks,
// and the rising edges come in the order Ph0, Ph1, Ph2, 2 clocks apart.
module tb_johnson_clkgen;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [2:0] ph, ph_d;
  int checks = 0, failures = 0;
  int last_rise [3];
  int cyc = 0, high_cnt [3];

  johnson_clkgen dut (.clk, .rst_n, .ph);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int k = 0; k < 3; k++) begin last_rise[k] = -1; high_cnt[k] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    ph_d = ph;
    for (cyc = 1; cyc <= 60; cyc++) begin
      @(posedge clk); #1;
      for (int k = 0; k < 3; k++) begin
        if (ph[k]) high_cnt[k]++;
        if (ph[k] && !ph_d[k]) begin
          if (last_rise[k] >= 0) check(cyc - last_rise[k] == 6, $sformatf("period of Ph%0d", k));
          last_rise[k] = cyc;
          // Ph(k) rises 2 clocks after Ph(k-1).
          if (last_rise[(k + 2) % 3] >= 0)
            check(cyc - last_rise[(k + 2) % 3] == 2, $sformatf("Ph%0d follows Ph%0d by 2", k, (k + 2) % 3));
        end
      end
      ph_d = ph;
    end
    for (int k = 0; k < 3; k++) check(high_cnt[k] == 30, $sformatf("duty of Ph%0d", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
