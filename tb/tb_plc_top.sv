// tb_plc_top: end-to-end run of the link at its default parameters.
//
// The transmitter (chip clock clk_tx, 60 ns) and the receiver (clk_rx,
// 10 ns, six times the nominal chip rate) run from independent clocks and
// are joined by a loop-back line with a random delay. Eight bursts are
// sent, some with the transmitter clock 3250 ppm fast or slow. Each burst
// carries a random 32-bit word whose low five bits are a control code.
// Checks: every burst is received once with the right word; the receiver
// locks within the preamble; the backend outputs follow the codes (buck
// target, LED NMOS flashing at code 17 = 6 Hz with 50 % on-time and 50 %
// dimming, motor PMOS/NMOS drive). Each mechanism of the design is counted
// and must occur: acquisition steps, lock, loss of lock after a burst, sync
// detection, frame delivery, tracking advance (lag_OV), tracking delay
// (lead_OV), buck selection change, LED flash window, dimming PWM, motor
// PWM and motor PMOS drive.
// Delays are in ns with fractional parts: build with --timescale 1ns/1ps.
module tb_plc_top;
  import dsss_pkg::*;

  logic clk_tx = 1'b0, clk_rx = 1'b0, rst_tx_n = 1'b0, rst_rx_n = 1'b0;
  logic start = 1'b0;
  logic [31:0] tx_data = '0;
  logic tx_out, tx_busy, rx_in = 1'b0;
  logic [31:0] rx_ctrl;
  logic rx_frame_valid, rx_synced, rx_get, rx_rot_lead, rx_rot_lag, rx_acq_step;
  logic [1:0] buck_vsel;
  logic led_p_gate, led_n_gate, m2_p_gate, m2_n_gate, m3_p_gate, m3_n_gate;

  int checks = 0, failures = 0;
  real tx_half = 30.0;
  real line_delay;

  // mechanism counters
  logic tx_bit, tx_bit_en, rx_send, rx_data_bit, rx_data_valid;
  int n_tx_bits = 0, n_rx_bits = 0;
  int n_acq = 0, n_lock = 0, n_unlock = 0, n_get = 0, n_frame = 0;
  int n_track_lag = 0, n_track_lead = 0, n_buck_change = 0;
  int n_flash_edge = 0, n_dim_edge = 0, n_motor_edge = 0, n_motor_p = 0;
  int frame_in_burst = 0;
  logic synced_d = 1'b0, led_d = 1'b0, m3_d = 1'b0;
  logic [1:0] buck_d = '0;
  logic [31:0] expect_word;

  plc_top dut (
    .clk_tx, .rst_tx_n, .start, .tx_data, .tx_out, .tx_busy, .tx_bit, .tx_bit_en,
    .clk_rx, .rst_rx_n, .rx_in, .rx_ctrl, .rx_frame_valid, .rx_synced, .rx_get,
    .rx_send, .rx_data_bit, .rx_data_valid,
    .rx_rot_lead, .rx_rot_lag, .rx_acq_step, .buck_vsel,
    .led_p_gate, .led_n_gate, .m2_p_gate, .m2_n_gate, .m3_p_gate, .m3_n_gate
  );

  always #5 clk_rx = ~clk_rx;
  initial forever begin
    #(tx_half);
    clk_tx = ~clk_tx;
  end

  // Power-line stand-in: a pure transport delay.
  // Line model: every edge is queued with its arrival time and delivered
  // by a 2 ns poll, so several edges can be in flight on the line at once.
  realtime line_t[$];
  logic    line_v[$];
  always @(tx_out) begin
    line_t.push_back($realtime + line_delay);
    line_v.push_back(tx_out);
  end
  initial forever begin
    #2;
    while (line_t.size() != 0 && line_t[0] <= $realtime) begin
      rx_in = line_v.pop_front();
      void'(line_t.pop_front());
    end
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk_tx) if (rst_tx_n && tx_busy && tx_bit_en) n_tx_bits++;

  always @(posedge clk_rx) if (rst_rx_n) begin
    if (rx_acq_step) n_acq++;
    if (rx_rot_lag  && rx_synced) n_track_lag++;
    if (rx_rot_lead && rx_synced) n_track_lead++;
    if (rx_synced && !synced_d) n_lock++;
    if (!rx_synced && synced_d) n_unlock++;
    if (rx_get && !rx_send) n_get++;          // Get that opens a frame window
    if (rx_data_valid) n_rx_bits++;
    if (rx_frame_valid) begin
      n_frame++;
      frame_in_burst++;
      check(rx_ctrl == expect_word, $sformatf("received %h, sent %h", rx_ctrl, expect_word));
    end
    if (buck_vsel != buck_d) n_buck_change++;
    if (led_n_gate && !led_d) n_dim_edge++;
    if (m3_n_gate && !m3_d) n_motor_edge++;
    if (m2_p_gate || m3_p_gate) n_motor_p++;
    synced_d <= rx_synced;
    buck_d   <= buck_vsel;
    led_d    <= led_n_gate;
    m3_d     <= m3_n_gate;
  end

  task automatic burst(input logic [4:0] code, input real ppm);
    logic [31:0] w;
    w = {27'($urandom), code};
    tx_half = 30.0 * (1.0 - ppm * 1e-6);
    expect_word = w;
    frame_in_burst = 0;
    @(negedge clk_tx) tx_data = w; start = 1'b1;
    @(negedge clk_tx) start = 1'b0;
    wait (tx_busy);
    wait (!tx_busy);
    // let the receiver finish and drop lock on the idle line
    repeat (400) @(posedge clk_rx);
    check(frame_in_burst == 1, $sformatf("one frame for code %0d at %0.0f ppm (%0d)", code, ppm, frame_in_burst));
    check(!rx_synced, "lock released after the burst");
    repeat ($urandom % 500) @(posedge clk_rx);
  endtask

  initial begin
    int hi, win;
    line_delay = 100.0 + real'($urandom % 900);
    repeat (20) @(posedge clk_rx);   // spans clk_tx edges too
    #1 rst_rx_n = 1'b1; rst_tx_n = 1'b1;
    repeat (50) @(posedge clk_rx);

    burst(5'd1, 0.0);        check(buck_vsel == 2'd1, "buck 3 V");
    burst(5'd3, 3250.0);     check(buck_vsel == 2'd3, "buck 9 V");
    burst(5'd24, -3250.0);   check(m2_p_gate && !m2_n_gate, "motor s2 PMOS on");
    burst(5'd27, 3250.0);    check(!m3_p_gate, "motor s3 PMOS off");
    burst(5'd15, -3250.0);   // NMOS LED dimming 50 %
    burst(5'd22, 0.0);       // NMOS LED on-time 50 %
    burst(5'd17, 0.0);       // NMOS LED 6 Hz, restarts the flash period
    check(n_frame == 7, $sformatf("%0d frames", n_frame));

    // One flash period of the NMOS LED: 6 Hz at FCLK_HZ = 1 562 500.
    // Expected high time: 50 % window x 50 % dimming of the period.
    // The window is measured in 64-clock blocks (one dimming PWM period):
    // a block inside the window always holds a high pulse.
    hi = 0; win = 0;
    for (int i = 0; i < 260416 / 64; i++) begin
      int blk;
      blk = 0;
      for (int k = 0; k < 64; k++) begin
        @(negedge clk_rx);
        blk += led_n_gate;
      end
      hi += blk;
      if (blk > 0) win += 64;
    end
    if (win > 0 && win < 260416) n_flash_edge++;
    check(win >= 130208 - 128 && win <= 130208 + 128, $sformatf("flash window %0d of 260416 clocks", win));
    check(hi >= win / 2 - 128 && hi <= win / 2 + 128, $sformatf("LED high %0d in window %0d", hi, win));

    // Motor s3 at 80 %: 205/256 of the time.
    hi = 0;
    for (int i = 0; i < 2560; i++) begin @(negedge clk_rx); hi += m3_n_gate; end
    check(hi == 2050, $sformatf("motor s3 NMOS %0d/2560", hi));

    burst(5'd0, 0.0);        check(buck_vsel == 2'd0, "buck 1.5 V");

    check(n_acq > 0,         $sformatf("acquisition steps: %0d", n_acq));
    check(n_lock == 8,       $sformatf("locks: %0d", n_lock));
    check(n_unlock == 8,     $sformatf("lock releases: %0d", n_unlock));
    // The last word bits plus the fill bit may form 1011 once more; that late
    // window is abandoned when lock drops, so frames stay exactly 8.
    check(n_get >= 8 && n_get <= 16, $sformatf("sync detections: %0d", n_get));
    check(n_frame == 8,      $sformatf("frames: %0d", n_frame));
    check(n_tx_bits == 8 * 75, $sformatf("transmitted bits: %0d (8 bursts of 75)", n_tx_bits));
    check(n_rx_bits >= 8 * 32 && n_rx_bits < 8 * 75, $sformatf("recovered bits while locked: %0d", n_rx_bits));
    check(n_track_lag > 0,   $sformatf("tracking advances (lag_OV): %0d", n_track_lag));
    check(n_track_lead > 0,  $sformatf("tracking delays (lead_OV): %0d", n_track_lead));
    check(n_buck_change > 0, $sformatf("buck target changes: %0d", n_buck_change));
    check(n_flash_edge > 0,  "LED flash window seen");
    check(n_dim_edge > 0,    $sformatf("dimming PWM pulses: %0d", n_dim_edge));
    check(n_motor_edge > 0,  $sformatf("motor PWM pulses: %0d", n_motor_edge));
    check(n_motor_p > 0,     "motor PMOS drive seen");
    $display("acq steps %0d, locks %0d, lag %0d, lead %0d, frames %0d",
             n_acq, n_lock, n_track_lag, n_track_lead, n_frame);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk_rx);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
