// tb_deserializer: 32 random bits shifted in (first bit = b[31]); the output
// keeps the previous word until load, then shows the new one.
module tb_deserializer;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, shift = 1'b0, din = 1'b0, load = 1'b0;
  logic [31:0] b, word, prev;
  logic valid;
  int checks = 0, failures = 0;

  deserializer dut (.clk, .rst_n, .en, .shift, .din, .load, .b, .valid);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    prev = '0;
    for (int w = 0; w < 20; w++) begin
      word = $urandom;
      for (int i = 31; i >= 0; i--) begin
        @(negedge clk);
        en = 1'b1; shift = 1'b1; din = word[i];
        @(negedge clk);
        en = 1'b0;
        // en without shift must not move the register
        din = ~din; en = 1'b1; shift = 1'b0;
        @(negedge clk);
        en = 1'b0;
        check(b == prev, "output holds during shifting");
      end
      load = 1'b1;
      @(negedge clk) load = 1'b0;
      check(b == word, $sformatf("word %0d: got %h want %h", w, b, word));
      check(valid, "valid after load");
      prev = word;
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
