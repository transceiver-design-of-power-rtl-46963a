// tb_timing_control: a get starts a 32-bit window: send rises the cycle
// after get, exactly 32 enabled bits are counted, load pulses once in the
// cycle after the 32nd and send falls with it; gets during send are ignored;
// clear abandons a window without a load.
module tb_timing_control;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, get = 1'b0, clear = 1'b0;
  logic send, load;
  int checks = 0, failures = 0;

  timing_control dut (.clk, .rst_n, .en, .get, .clear, .send, .load);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int frame = 0; frame < 6; frame++) begin
      int nbits;
      nbits = 0;
      // idle bits before get: no send, no load
      repeat (5) begin
        @(negedge clk) en = 1'b1;
        @(negedge clk) en = 1'b0;
        check(!send && !load, "idle");
      end
      @(negedge clk) get = 1'b1;
      @(negedge clk) get = 1'b0;
      check(send, "send after get");
      while (send) begin
        repeat ($urandom % 4) @(negedge clk);
        en  = 1'b1;
        get = (frame % 2) == 1;     // spurious gets while sending
        @(negedge clk) en = 1'b0; get = 1'b0;
        nbits++;
        check(load == (nbits == 32), $sformatf("load only after bit 32 (bit %0d)", nbits));
        if (nbits > 40) break;
      end
      check(nbits == 32, $sformatf("window length %0d", nbits));
      @(negedge clk);
      check(!load && !send, "single load pulse");
    end
    // clear abandons a window: no load afterwards
    @(negedge clk) get = 1'b1;
    @(negedge clk) get = 1'b0;
    repeat (10) begin @(negedge clk) en = 1'b1; @(negedge clk) en = 1'b0; end
    @(negedge clk) clear = 1'b1;
    @(negedge clk) clear = 1'b0;
    check(!send, "clear drops send");
    repeat (40) begin
      @(negedge clk) en = 1'b1;
      @(negedge clk) en = 1'b0;
      check(!load, "no load after clear");
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
