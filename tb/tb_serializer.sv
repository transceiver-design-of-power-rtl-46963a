// tb_serializer: after hold_load and a sel step the output carries b[31]
// first down to b[0], then 1s; a new hold_load during shifting does not
// disturb the word being sent.
module tb_serializer;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, hold_load = 1'b0, sel = 1'b0;
  logic [31:0] b, word;
  logic sout;
  int checks = 0, failures = 0;

  serializer dut (.clk, .rst_n, .en, .hold_load, .sel, .b, .sout);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int w = 0; w < 10; w++) begin
      word = $urandom;
      @(negedge clk) b = word; hold_load = 1'b1;
      @(negedge clk) hold_load = 1'b0; b = $urandom;
      @(negedge clk) en = 1'b1; sel = 1'b1;
      @(negedge clk) en = 1'b0; sel = 1'b0;
      for (int i = 31; i >= 0; i--) begin
        check(sout == word[i], $sformatf("word %0d bit %0d", w, i));
        if (i == 20) begin
          @(negedge clk) hold_load = 1'b1;
          @(negedge clk) hold_load = 1'b0;
        end
        @(negedge clk) en = 1'b1;
        @(negedge clk) en = 1'b0;
      end
      check(sout == 1'b1, "fill with 1");
      @(negedge clk) en = 1'b1;
      @(negedge clk) en = 1'b0;
      check(sout == 1'b1, "fill with 1 again");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
