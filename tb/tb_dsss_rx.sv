// tb_dsss_rx: bursts built here (preamble 1010...1011, 32-bit word MSB
// first, fill 1, Barker spread, line 0 between bursts) reach the receiver
// with a random delay; each must come out as exactly one frame with the
// right word, exactly one sync detection per burst must open a frame, and
// nothing may be delivered while the line is idle.
module tb_dsss_rx;
  logic clk = 1'b0, rst_n = 1'b0, rx_in = 1'b0;
  logic [31:0] ctrl;
  logic frame_valid, synced, get, send, data_bit, data_valid, rot_lead, rot_lag, acq_step;
  int checks = 0, failures = 0;
  int n_frames = 0, n_get = 0;
  logic [31:0] sent [$];
  localparam logic [0:10] SEQ = 11'b000_1110_1101;

  dsss_rx dut (.clk, .rst_n, .rx_in, .ctrl, .frame_valid, .synced, .get, .send,
               .data_bit, .data_valid, .rot_lead, .rot_lag, .acq_step);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send_burst(input logic [31:0] w);
    logic [74:0] bits;
    for (int b = 1; b <= 42; b++) bits[75 - b] = (b % 2 == 1) || (b == 42);
    bits[32:1] = w;
    bits[0] = 1'b1;
    for (int b = 74; b >= 0; b--)
      for (int k = 0; k < 11; k++) begin
        rx_in = bits[b] ^ SEQ[k];
        #60;
      end
    rx_in = 1'b0;
  endtask

  always @(posedge clk) begin
    if (rst_n && get && !send) n_get++;
    if (rst_n && frame_valid) begin
      n_frames++;
      check(sent.size() > 0, "frame only after a burst");
      if (sent.size() > 0) begin
        check(ctrl == sent[0], $sformatf("word %h, sent %h", ctrl, sent[0]));
        void'(sent.pop_front());
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 5; i++) begin
      logic [31:0] w;
      w = $urandom;
      #(1000.0 + real'($urandom % 3000));
      sent.push_back(w);
      send_burst(w);
    end
    #20000;
    check(n_frames == 5, $sformatf("%0d frames", n_frames));
    check(n_get == 5, $sformatf("%0d frame-opening sync detections", n_get));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
