// tb_preamble_counter: one burst per start: 75 bits numbered 1..75; the
// preamble over bits 1..42 is 1010...1011; the holding-register load comes
// at the boundary into bit 40, the chain load at the boundary into bit 43,
// and the mux takes data for bits 43..75; the counter then idles.
module tb_preamble_counter;
  logic clk = 1'b0, rst_n = 1'b0, bit_en = 1'b0, start = 1'b0;
  logic [6:0] cnt;
  logic busy, preamble, hold_load, ser_sel, use_data;
  int checks = 0, failures = 0;

  preamble_counter dut (.clk, .rst_n, .bit_en, .start, .cnt, .busy, .preamble,
                        .hold_load, .ser_sel, .use_data);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int burst = 0; burst < 3; burst++) begin
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      check(!busy, "start waits for a bit boundary");
      for (int k = 1; k <= 80; k++) begin
        int seen_hold, seen_sel;
        seen_hold = 0; seen_sel = 0;
        // bit boundary
        @(negedge clk) bit_en = 1'b1;
        #1;
        if (hold_load) seen_hold = 1;
        if (ser_sel)   seen_sel  = 1;
        @(negedge clk) bit_en = 1'b0;
        check(seen_hold == (k == 40), $sformatf("hold_load into bit %0d", k));
        check(seen_sel == (k == 43), $sformatf("ser_sel into bit %0d", k));
        if (k <= 75) begin
          check(busy && cnt == 7'(k), $sformatf("bit number %0d", k));
          if (k <= 42) check(preamble == ((k % 2 == 1) || k == 42), $sformatf("preamble bit %0d", k));
          check(use_data == (k >= 43), $sformatf("mux at bit %0d", k));
        end else begin
          check(!busy, $sformatf("idle after burst (%0d)", k));
        end
        repeat (3) @(negedge clk);
      end
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
