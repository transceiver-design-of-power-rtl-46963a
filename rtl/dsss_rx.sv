// dsss_rx: DSSS burst receiver.
//
// The CDR locks onto the Barker-spread chips and delivers one recovered
// bit per 11 chips. The sequence detector watches those bits for the sync
// pattern 1011 that ends the preamble; its get pulse starts the timing
// control, which lets the deserializer shift in the next 32 bits and then
// loads them, in one step, into the output word ctrl. ctrl holds the last
// word received; frame_valid pulses once per received word. Everything
// runs on clk, the receiver clock at 6 x chip rate.
module dsss_rx
  import dsss_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 rx_in,
  output logic [DATA_BITS-1:0] ctrl,
  output logic                 frame_valid,
  output logic                 synced,
  output logic                 get,
  output logic                 send,
  output logic                 data_bit,
  output logic                 data_valid,
  output logic                 rot_lead,
  output logic                 rot_lag,
  output logic                 acq_step
);

  logic [2:0] phase_sel;
  logic [3:0] punct_sum;
  logic       chip_tick;
  logic       load;

  cdr u_cdr (
    .clk, .rst_n, .rx_in, .data_bit, .data_valid, .synced,
    .rot_lead, .rot_lag, .acq_step, .phase_sel, .punct_sum, .chip_tick
  );

  seq_detector u_sd (.clk, .rst_n, .clear(!synced), .en(data_valid), .din(data_bit), .get);

  timing_control #(.NBITS(DATA_BITS)) u_tc (.clk, .rst_n, .en(data_valid), .get, .clear(!synced),
                                            .send, .load);

  deserializer #(.NBITS(DATA_BITS)) u_des (
    .clk, .rst_n, .en(data_valid), .shift(send), .din(data_bit), .load,
    .b(ctrl), .valid(frame_valid)
  );

endmodule
