// tb_phase_shift_fsm: random threshold results against a reference model of
// "lock after two passes in a row, unlock after two fails in a row".
module tb_phase_shift_fsm;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, td = 1'b0;
  logic select;
  int checks = 0, failures = 0;
  int st = 0;       // reference state 0, 1, 2
  logic sel_ref = 1'b0;

  phase_shift_fsm dut (.clk, .rst_n, .en, .td, .select);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      en = ($urandom % 3) != 0;
      td = (i % 100 < 50) ? (($urandom % 5) != 0) : (($urandom % 5) == 0);
      @(posedge clk); #1;
      if (en) begin
        case (st)
          0: begin sel_ref = 1'b0; st = td ? 1 : 0; end
          1: begin sel_ref = td;   st = td ? 2 : 0; end
          default: begin sel_ref = 1'b1; st = td ? 2 : 1; end
        endcase
      end
      checks++;
      if (select !== sel_ref) begin failures++; $display("FAIL step %0d", i); end
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
