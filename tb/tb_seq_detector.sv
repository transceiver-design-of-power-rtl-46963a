// tb_seq_detector: random bits and preamble-like runs; get must pulse
// exactly when the last four accepted bits are 1011, and never while clear.
module tb_seq_detector;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, en = 1'b0, din = 1'b0;
  logic get;
  int checks = 0, failures = 0, n_get = 0;
  logic [3:0] hist = '0;
  logic exp_get;

  seq_detector dut (.clk, .rst_n, .clear, .en, .din, .get);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en    = ($urandom % 3) != 0;
      clear = ($urandom % 100) == 0;
      din   = (i % 200 < 100) ? 1'(i % 2 == 0) | (i % 200 == 98) : 1'($urandom);
      exp_get = 1'b0;
      if (clear) hist = '0;
      else if (en) begin
        hist = {hist[2:0], din};
        exp_get = (hist == 4'b1011);
      end
      @(posedge clk); #1;
      checks++;
      if (get !== exp_get) begin failures++; $display("FAIL step %0d get=%b", i, get); end
      if (get) n_get++;
    end
    checks++;
    if (n_get < 10) begin failures++; $display("FAIL too few detections"); end
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
