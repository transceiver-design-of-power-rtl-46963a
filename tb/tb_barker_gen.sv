// tb_barker_gen: checks the Barker generator's chip sequence, its period of
// 11 enables, that it holds without enable, and the end-of-bit decodes.
module tb_barker_gen;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic chip, chip_next, last, last_next;
  int checks = 0, failures = 0;

  // Expected chip sequence after reset, chip 0 first.
  localparam logic [0:10] SEQ = 11'b000_1110_1101;

  barker_gen dut (.clk, .rst_n, .en, .chip, .chip_next, .last, .last_next);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(chip == SEQ[10] && last, "reset state is chip 10");
    check(chip_next == SEQ[0] && !last_next, "next after reset is chip 0");
    for (int k = 0; k < 33; k++) begin
      @(negedge clk) en = 1'b1;
      @(negedge clk) en = 1'b0;
      check(chip == SEQ[k % 11], $sformatf("chip %0d", k));
      check(chip_next == SEQ[(k + 1) % 11], $sformatf("chip_next %0d", k));
      check(last == (k % 11 == 10), $sformatf("last %0d", k));
      check(last_next == (k % 11 == 9), $sformatf("last_next %0d", k));
      // Holding: two idle clocks change nothing.
      repeat (2) @(negedge clk);
      check(chip == SEQ[k % 11], $sformatf("hold %0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
