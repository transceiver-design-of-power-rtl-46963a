// cdr: clock and data recovery by phase rotation for Barker-spread data.
//
// Runs entirely in the receiver clock domain, clk = 6 x chip rate. A
// Johnson counter makes three chip-rate phases 1/3 chip apart; the phase
// rotator turns the selected phase into early, punctual and late sampling
// strobes (Ph+, Php, Ph-). The local Barker generator advances on Ph+.
// Three correlators despread the early, punctual and late samples against
// the local code and dump once per bit (11 chips).
//
// Code acquisition: while the punctual correlation magnitude stays at or
// below 3, the phase shift FSM keeps select = 0 and the mux forces one
// lead_OV per bit, so the local code slides 1/3 chip later per bit until it
// lines up (at most 33 steps). Two passing bits in a row set select.
// Code tracking (select = 1): if the early path fails and the late passes,
// the confidence counter gets R; late fails and early passes gives L. Three
// consecutive R (L) give lead_OV (lag_OV), delaying (advancing) all three
// phases by 1/3 chip, which follows a transmitter/receiver frequency error.
// Data: the punctual count X above 6 is a 1; the decision is retimed in a
// flip-flop and delivered as data_bit with a one-cycle data_valid pulse per
// bit while select is high.
//
// Choices of this design: the input passes a two-flop synchronizer; the
// early sample uses the code chip that starts at that Ph+ edge; a lead/lag
// request is held until the next Ph+ edge and applied there (which is what
// the rotator's race guard needs); the confidence counter is held at its
// centre state while not tracking.
module cdr
  import dsss_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx_in,
  output logic       data_bit,
  output logic       data_valid,
  output logic       synced,       // phase shift FSM select
  output logic       rot_lead,     // one cycle per applied 1/3-chip delay
  output logic       rot_lag,      // one cycle per applied 1/3-chip advance
  output logic       acq_step,     // rot_lead caused by acquisition
  output logic [2:0] phase_sel,
  output logic [3:0] punct_sum,
  output logic       chip_tick     // Ph+ strobe (recovered chip clock)
);

  // Input synchronizer.
  logic [1:0] rx_sync;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rx_sync <= '0;
    else        rx_sync <= {rx_sync[0], rx_in};
  end
  logic rx_s;
  assign rx_s = rx_sync[1];

  // Multi-phase clock and phase rotation.
  logic [2:0] ph;
  logic       ph_plus, ph_p, ph_m;
  logic       tick_e, tick_p, tick_m;

  johnson_clkgen u_jc (.clk, .rst_n, .ph);

  phase_rotator u_rot (
    .clk, .rst_n, .ph, .sel(phase_sel),
    .ph_plus, .ph_p, .ph_m, .tick_e, .tick_p, .tick_m
  );

  // Local Barker code, clocked by Ph+.
  logic chip, chip_next, last, last_next;
  barker_gen u_barker (.clk, .rst_n, .en(tick_e), .chip, .chip_next, .last, .last_next);

  // Early, punctual, late correlators.
  logic [3:0] sum_e, sum_p, sum_m, mag_e, mag_p, mag_m;
  logic       td_e, td_p, td_m, dump_e, dump_p, dump_m;

  correlator u_cor_e (.clk, .rst_n, .strobe(tick_e), .sample(rx_s), .chip(chip_next),
                      .last(last_next), .sum(sum_e), .mag(mag_e), .td(td_e), .dump(dump_e));
  correlator u_cor_p (.clk, .rst_n, .strobe(tick_p), .sample(rx_s), .chip(chip),
                      .last(last), .sum(sum_p), .mag(mag_p), .td(td_p), .dump(dump_p));
  correlator u_cor_m (.clk, .rst_n, .strobe(tick_m), .sample(rx_s), .chip(chip),
                      .last(last), .sum(sum_m), .mag(mag_m), .td(td_m), .dump(dump_m));

  // Acquisition lock.
  phase_shift_fsm u_psf (.clk, .rst_n, .en(dump_p), .td(td_p), .select(synced));

  // Data decision and retiming.
  logic bit_q, data_q;
  logic acq_req, lead_req, lag_req;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bit_q  <= 1'b0;
      data_q <= 1'b0;
    end else begin
      bit_q <= dump_p;
      if (dump_p) data_q <= (sum_p > 4'(DATA_THRESH));
    end
  end
  assign data_bit   = data_q;
  assign data_valid = bit_q && synced;
  assign acq_req    = bit_q && !synced;

  // Tracking: early result of this bit held until the late dump.
  logic td_e_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      td_e_q <= 1'b0;
    else if (dump_e) td_e_q <= td_e;
  end

  logic cc_r, cc_l, cc_r_ov, cc_l_ov;
  logic signed [7:0] cc_pos;
  assign cc_r = !td_e_q &&  td_m;
  assign cc_l =  td_e_q && !td_m;

  confidence_counter u_cc (
    .clk, .rst_n, .clear(!synced), .en(dump_m && synced), .r(cc_r), .l(cc_l),
    .r_ov(cc_r_ov), .l_ov(cc_l_ov), .pos(cc_pos)
  );

  // Mux: acquisition forces lead_OV, tracking passes the loop filter.
  assign lead_req = synced ? cc_r_ov : acq_req;
  assign lag_req  = synced && cc_l_ov;

  // A request waits in pend_* until the next Ph+ strobe applies it; a
  // request arriving in the cycle of that strobe waits for the one after.
  logic pend_lead, pend_lag, pend_acq;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_lead <= 1'b0;
      pend_lag  <= 1'b0;
      pend_acq  <= 1'b0;
    end else if (lead_req) begin
      pend_lead <= 1'b1;
      pend_lag  <= 1'b0;
      pend_acq  <= !synced;
    end else if (lag_req) begin
      pend_lead <= 1'b0;
      pend_lag  <= 1'b1;
      pend_acq  <= 1'b0;
    end else if (tick_e) begin
      pend_lead <= 1'b0;
      pend_lag  <= 1'b0;
      pend_acq  <= 1'b0;
    end
  end

  phase_control_fsm u_pcf (.clk, .rst_n, .en(tick_e), .lead_ov(pend_lead),
                           .lag_ov(pend_lag), .sel(phase_sel));

  assign rot_lead  = tick_e && pend_lead;
  assign rot_lag   = tick_e && pend_lag;
  assign acq_step  = tick_e && pend_lead && pend_acq;
  assign punct_sum = sum_p;
  assign chip_tick = tick_e;

endmodule
