// tb_correlator: random 11-chip frames with random chip errors; the dumped
// count must equal the number of sample/code mismatches, the magnitude
// |2X-11| and td (magnitude > 3) must follow, and exactly one dump comes per
// 11 strobes, one clock after the last one.
module tb_correlator;
  logic clk = 1'b0, rst_n = 1'b0;
  logic strobe = 1'b0, sample = 1'b0, chip = 1'b0, last = 1'b0;
  logic [3:0] sum, mag;
  logic td, dump;
  int checks = 0, failures = 0;
  int ones, n_dump = 0, n_td = 0, n_notd = 0;
  localparam logic [0:10] SEQ = 11'b000_1110_1101;

  correlator dut (.clk, .rst_n, .strobe, .sample, .chip, .last, .sum, .mag, .td, .dump);
  always #5 clk = ~clk;
  always @(posedge clk) if (dump) n_dump++;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int f = 0; f < 300; f++) begin
      logic d;
      int nerr;
      d = 1'($urandom);
      nerr = (f < 100) ? int'($urandom % 3) : int'($urandom % 12);
      ones = 0;
      for (int k = 0; k < 11; k++) begin
        logic flip;
        flip = ($urandom % 11) < nerr;
        @(negedge clk);
        chip   = SEQ[k];
        sample = d ^ SEQ[k] ^ flip;
        if (sample ^ chip) ones++;
        strobe = 1'b1;
        last   = (k == 10);
        @(negedge clk);
        strobe = 1'b0;
        last   = 1'b0;
        check(dump == (k == 10), "dump once per bit, after the last chip");
        // idle clocks between strobes
        repeat ($urandom % 3) @(negedge clk);
      end
      check(sum == 4'(ones), $sformatf("frame %0d sum %0d want %0d", f, sum, ones));
      check(mag == 4'((2 * ones > 11) ? 2 * ones - 11 : 11 - 2 * ones), "magnitude");
      check(td == ((2 * ones > 11 ? 2 * ones - 11 : 11 - 2 * ones) > 3), "threshold");
      if (td) n_td++; else n_notd++;
    end
    check(n_dump == 300, "dump count");
    check(n_td > 20 && n_notd > 20, "both threshold outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
