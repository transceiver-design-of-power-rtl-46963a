// tb_cdr_jitter: jitter tolerance of the CDR. A PRBS7 bit stream, spread
// with the Barker code, is sent from an independent chip clock whose every
// chip edge is moved by deterministic jitter (uniform, 0.55 UI peak to peak)
// plus random jitter (Gaussian, sigma 0.04 UI, i.e. about 0.55 UI peak to
// peak at 14 sigma), one UI being one chip. The first 400 bits run at the
// nominal rate, the next 400 with the transmitter 1000 ppm fast. Checks:
// lock within 40 bits; after lock every recovered bit satisfies the PRBS7
// recursion b[n] = b[n-7] ^ b[n-6]; lock is kept; the tracking loop keeps up
// with the 1000 ppm drift (net advances >= the 400 * 11 * 1000e-6 = 4.4
// chips = 13 steps it needs, less a margin for jitter-driven steps).
// Delays are in ns with fractional parts: build with --timescale 1ns/1ps.
module tb_cdr_jitter;
  logic clk = 1'b0, rst_n = 1'b0;
  logic rx_in = 1'b0;
  logic data_bit, data_valid, synced, rot_lead, rot_lag, acq_step, chip_tick;
  logic [2:0] phase_sel;
  logic [3:0] punct_sum;
  int checks = 0, failures = 0;
  localparam logic [0:10] SEQ = 11'b000_1110_1101;

  real chip_ns = 60.0;          // 6 receiver clocks of 10 ns
  localparam real DJ_PP    = 0.55;  // UI peak to peak, uniform
  localparam real RJ_SIGMA = 0.04;  // UI rms, Gaussian
  int  phase = 0;               // 0 nominal, 1 fast, 2 slow
  int  n_acq = 0, n_lead [3], n_lag [3], n_bits = 0, n_err = 0, n_unlock = 0;
  int  lock_bit = -1, tx_bits = 0;
  logic [6:0] hist = '0;
  int  nhist = 0;
  logic synced_d = 1'b0;

  cdr dut (.clk, .rst_n, .rx_in, .data_bit, .data_valid, .synced, .rot_lead, .rot_lag,
           .acq_step, .phase_sel, .punct_sum, .chip_tick);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // Transmitter model: PRBS7 (x^7 + x^6 + 1), each bit XORed with 11 chips.
  // Chip k starts at its ideal time plus that edge's jitter.
  function automatic real gauss();
    real acc = 0.0;
    for (int i = 0; i < 12; i++) acc += real'($urandom % 65536) / 65536.0;
    return acc - 6.0;
  endfunction

  realtime t_ideal;
  initial begin
    logic [6:0] lfsr;
    real j, t_edge;
    lfsr = 7'h5a;
    t_ideal = 137.0 + real'($urandom % 600);
    forever begin
      logic b;
      b = lfsr[6] ^ lfsr[5];
      lfsr = {lfsr[5:0], b};
      tx_bits++;
      for (int k = 0; k < 11; k++) begin
        j = DJ_PP * (real'($urandom % 65536) / 65536.0 - 0.5) + RJ_SIGMA * gauss();
        t_edge = t_ideal + j * chip_ns;
        if (t_edge > $realtime) #(t_edge - $realtime);
        rx_in = b ^ SEQ[k];
        t_ideal += chip_ns;
      end
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (acq_step) n_acq++;
      if (rot_lead && synced) n_lead[phase]++;
      if (rot_lag  && synced) n_lag[phase]++;
      if (synced && !synced_d && lock_bit < 0) lock_bit = tx_bits;
      if (!synced && synced_d) n_unlock++;
      synced_d <= synced;
      if (data_valid) begin
        n_bits++;
        if (nhist >= 7) begin
          if (data_bit != (hist[6] ^ hist[5])) n_err++;
        end
        hist = {hist[5:0], data_bit};
        nhist++;
      end
    end
  end

  initial begin
    for (int i = 0; i < 3; i++) begin n_lead[i] = 0; n_lag[i] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (tx_bits == 150);
    check(lock_bit > 0 && lock_bit <= 40, $sformatf("locked at bit %0d", lock_bit));
    check(n_acq >= 1 && n_acq <= 35, $sformatf("%0d acquisition steps", n_acq));
    wait (tx_bits == 400);
    phase = 1; chip_ns = 60.0 * (1.0 - 1000e-6);
    wait (tx_bits == 800);
    check(n_bits > 700, $sformatf("%0d bits recovered", n_bits));
    check(n_err == 0, $sformatf("%0d bit errors", n_err));
    check(n_unlock == 0, $sformatf("lock kept (%0d losses)", n_unlock));
    check(n_lag[1] - n_lead[1] >= 9, $sformatf("fast TX: %0d lag, %0d lead steps", n_lag[1], n_lead[1]));
    $display("lock at bit %0d after %0d steps; nominal: %0d lag %0d lead; +1000 ppm: %0d lag %0d lead; %0d bits",
             lock_bit, n_acq, n_lag[0], n_lead[0], n_lag[1], n_lead[1], n_bits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
