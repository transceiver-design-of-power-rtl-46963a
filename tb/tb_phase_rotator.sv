// tb_phase_rotator: with the Johnson phases as input, Ph+ strobes come every
// 6 clocks; a one-step rotation to a later phase, made right after a strobe,
// gives one 8-clock chip, a step to an earlier phase one 4-clock chip; the
// punctual and late strobes follow the early one by 2 and 4 clocks; the
// muxed Ph+ matches the selected phase.
module tb_phase_rotator;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [2:0] ph, sel;
  logic ph_plus, ph_p, ph_m, tick_e, tick_p, tick_m;
  int checks = 0, failures = 0;
  int cyc = 0, last_e = -1;
  int q_p[$], q_m[$];
  int expect_gap = 6;
  int n_long = 0, n_short = 0, n_ticks = 0;

  johnson_clkgen u_jc (.clk, .rst_n, .ph);
  phase_rotator dut (.clk, .rst_n, .ph, .sel, .ph_plus, .ph_p, .ph_m, .tick_e, .tick_p, .tick_m);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    sel = 3'b001;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    forever begin
      @(negedge clk);
      cyc++;
      check(ph_plus == |(ph & sel), "ph_plus follows selected phase");
      if (tick_p) begin
        check(q_p.size() > 0 && q_p[0] == cyc, "tick_p 2 after tick_e");
        if (q_p.size() > 0) void'(q_p.pop_front());
      end
      if (tick_m) begin
        check(q_m.size() > 0 && q_m[0] == cyc, "tick_m 4 after tick_e");
        if (q_m.size() > 0) void'(q_m.pop_front());
      end
      if (tick_e) begin
        n_ticks++;
        if (last_e >= 0) check(cyc - last_e == expect_gap, $sformatf("chip length %0d, expected %0d", cyc - last_e, expect_gap));
        last_e = cyc;
        q_p.push_back(cyc + 2);
        q_m.push_back(cyc + 4);
        expect_gap = 6;
        // Every fifth chip rotate, alternating later / earlier / later...
        if (n_ticks % 5 == 0) begin
          @(posedge clk); #1;
          if ((n_ticks / 5) % 3 != 0) begin sel = {sel[1:0], sel[2]}; expect_gap = 8; n_long++; end
          else                       begin sel = {sel[0], sel[2:1]}; expect_gap = 4; n_short++; end
        end
      end
    end
  end

  initial begin
    repeat (3000) @(posedge clk);
    check(n_long > 10 && n_short > 10, "both rotation directions exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
