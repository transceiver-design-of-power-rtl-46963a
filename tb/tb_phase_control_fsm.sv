// tb_phase_control_fsm: random lead/lag requests against a reference index
// (lead: index + 1 mod 3, lag: index - 1 mod 3), and no move without en.
module tb_phase_control_fsm;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, lead_ov = 1'b0, lag_ov = 1'b0;
  logic [2:0] sel;
  int checks = 0, failures = 0;
  int idx = 0;

  phase_control_fsm dut (.clk, .rst_n, .en, .lead_ov, .lag_ov, .sel);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(sel == 3'b001, "reset in C0");
    // Directed: lead C0->C1->C2->C0, lag C0->C2->C1->C0.
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      en      = ($urandom % 4) != 0;
      lead_ov = ($urandom % 2) != 0;
      lag_ov  = ($urandom % 3) == 0;
      @(posedge clk); #1;
      if (en && lead_ov && !lag_ov) idx = (idx + 1) % 3;
      if (en && lag_ov && !lead_ov) idx = (idx + 2) % 3;
      check(sel == 3'(1 << idx), $sformatf("step %0d sel=%b idx=%0d", i, sel, idx));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
