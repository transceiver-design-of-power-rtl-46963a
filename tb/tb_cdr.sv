// tb_cdr: a PRBS7 bit stream, spread with the Barker code, is sent to the
// CDR from an independent chip clock with a random start delay, first at
// the nominal rate, then 3000 ppm fast, then 3000 ppm slow. Checks: lock
// (select) within 40 bits using at most 33 acquisition steps; after lock
// every recovered bit satisfies the PRBS7 recursion b[n] = b[n-7] ^ b[n-6]
// (so no bit is lost, doubled or wrong); lock is kept through the frequency
// steps; the fast run makes the tracking loop advance the phase (lag_OV)
// and the slow run makes it delay the phase (lead_OV), each about as often
// as the drift requires (one step per 1/3 chip).
// Delays are in ns with fractional parts: build with --timescale 1ns/1ps.
module tb_cdr;
  logic clk = 1'b0, rst_n = 1'b0;
  logic rx_in = 1'b0;
  logic data_bit, data_valid, synced, rot_lead, rot_lag, acq_step, chip_tick;
  logic [2:0] phase_sel;
  logic [3:0] punct_sum;
  int checks = 0, failures = 0;
  localparam logic [0:10] SEQ = 11'b000_1110_1101;

  real chip_ns = 60.0;          // 6 receiver clocks of 10 ns
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
  initial begin
    logic [6:0] lfsr;
    lfsr = 7'h5a;
    #(137.0 + real'($urandom % 600));
    forever begin
      logic b;
      b = lfsr[6] ^ lfsr[5];
      lfsr = {lfsr[5:0], b};
      tx_bits++;
      for (int k = 0; k < 11; k++) begin
        rx_in = b ^ SEQ[k];
        #(chip_ns);
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
    phase = 1; chip_ns = 60.0 * (1.0 - 3000e-6);
    wait (tx_bits == 450);
    phase = 2; chip_ns = 60.0 * (1.0 + 3000e-6);
    wait (tx_bits == 750);
    check(n_bits > 650, $sformatf("%0d bits recovered", n_bits));
    check(n_err == 0, $sformatf("%0d bit errors", n_err));
    check(n_unlock == 0, "lock kept");
    // 300 bits * 11 chips * 3000 ppm = 9.9 chips = about 30 steps of 1/3 chip
    check(n_lag[1] >= 22 && n_lag[1] <= 38 && n_lead[1] <= 2, $sformatf("fast TX: %0d lag, %0d lead steps", n_lag[1], n_lead[1]));
    check(n_lead[2] >= 22 && n_lead[2] <= 38 && n_lag[2] <= 2, $sformatf("slow TX: %0d lead, %0d lag steps", n_lead[2], n_lag[2]));
    $display("lock at bit %0d after %0d steps; fast: %0d lag; slow: %0d lead; %0d bits",
             lock_bit, n_acq, n_lag[1], n_lead[2], n_bits);
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
