// tb_confidence_counter: random R/L requests against a reference model of
// the continuous-type counter: an overflow needs N = 3 requests in the same
// direction counted from the centre state; a request against a run returns
// the counter to the centre.
module tb_confidence_counter;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, en = 1'b0, r = 1'b0, l = 1'b0;
  logic r_ov, l_ov;
  logic signed [7:0] pos;
  int checks = 0, failures = 0;
  int run_r = 0, run_l = 0, n_rov = 0, n_lov = 0;
  logic exp_r, exp_l;

  confidence_counter dut (.clk, .rst_n, .clear, .en, .r, .l, .r_ov, .l_ov, .pos);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      clear = ($urandom % 200) == 0;
      en    = ($urandom % 4) != 0;
      // Phases biased right, then left, then balanced.
      case ((i / 500) % 3)
        0: begin r = ($urandom % 10) < 7; l = ($urandom % 10) < 2; end
        1: begin r = ($urandom % 10) < 2; l = ($urandom % 10) < 7; end
        default: begin r = 1'($urandom); l = 1'($urandom); end
      endcase
      exp_r = 1'b0; exp_l = 1'b0;
      if (clear) begin run_r = 0; run_l = 0; end
      else if (en && (r ^ l)) begin
        // A request against a run in the other direction only returns the
        // counter to its centre state; otherwise it extends its own run.
        if (r) begin
          if (run_l > 0) run_l = 0;
          else begin run_r++; if (run_r == 3) begin exp_r = 1'b1; run_r = 0; end end
        end else begin
          if (run_r > 0) run_r = 0;
          else begin run_l++; if (run_l == 3) begin exp_l = 1'b1; run_l = 0; end end
        end
      end
      @(posedge clk); #1;
      checks++;
      if (r_ov !== exp_r || l_ov !== exp_l) begin
        failures++; $display("FAIL step %0d r_ov=%b l_ov=%b want %b %b", i, r_ov, l_ov, exp_r, exp_l);
      end
      if (r_ov) n_rov++;
      if (l_ov) n_lov++;
    end
    checks++;
    if (n_rov < 10 || n_lov < 10) begin failures++; $display("FAIL overflows not exercised"); end
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
