// tb_dsss_tx: each burst is despread here with the Barker sequence: every
// group of 11 chips must carry one bit, the 75 bits must be the preamble
// 1010...1011, the control word MSB first and a fill 1, the burst must start
// on chip 0 of the code, and the line must be 0 between bursts.
module tb_dsss_tx;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [31:0] data;
  logic tx_out, busy, tx_bit, bit_en;
  int checks = 0, failures = 0;
  localparam logic [0:10] SEQ = 11'b000_1110_1101;

  dsss_tx dut (.clk, .rst_n, .start, .data, .tx_out, .busy, .tx_bit, .bit_en);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int burst = 0; burst < 4; burst++) begin
      logic [31:0] word;
      logic [74:0] bits;
      int nchips;
      word = $urandom;
      data = word;
      repeat ($urandom % 30) begin
        @(negedge clk);
        check(!tx_out, "line idle between bursts");
      end
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      while (!busy) begin
        check(!tx_out, "line idle before burst");
        @(negedge clk);
      end
      data = $urandom;    // input may change after bit 40 starts: captured there
      nchips = 0;
      for (int b = 0; b < 75; b++) begin
        logic v;
        for (int k = 0; k < 11; k++) begin
          check(busy, "busy during burst");
          if (k == 0) v = tx_out ^ SEQ[0];
          else check((tx_out ^ SEQ[k]) == v, $sformatf("burst %0d bit %0d chip %0d despreads", burst, b, k));
          if (b == 38 && k == 10) data = word;   // stable around the capture
          if (b == 40 && k == 0)  data = $urandom;
          @(negedge clk);
          nchips++;
        end
        bits[74 - b] = v;
      end
      check(!busy, "burst is 75 bits");
      for (int b = 1; b <= 42; b++)
        check(bits[75 - b] == ((b % 2 == 1) || b == 42), $sformatf("preamble bit %0d", b));
      check(bits[32:1] == word, $sformatf("data word %h sent as %h", word, bits[32:1]));
      check(bits[0] == 1'b1, "fill bit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
