// plc_top: power-line control link, transmitter to switch drivers.
//
// A DSSS burst transmitter and a DSSS receiver with its backend control.
// The power line and the capacitive coupling network between them are
// analog and outside this RTL, so the transmitter's chip stream leaves on
// tx_out and the receiver takes the recovered line signal on rx_in; a
// loop-back connection (or a channel model) joins them. The two halves run
// from independent clocks as on the real line: clk_tx at the chip rate,
// clk_rx at six times the chip rate. On start the transmitter sends one
// burst carrying tx_data; the receiver locks, finds the sync pattern,
// outputs the 32-bit word on rx_ctrl (rx_frame_valid pulses) and passes
// its low five bits, the control code, to the backend, which drives the
// LED, motor and buck-select outputs. The transmitted bit stream and the
// receiver's recovered bits and frame window are brought out for
// observation.
module plc_top
  import dsss_pkg::*;
#(
  parameter int unsigned FCLK_HZ = 1_562_500   // clk_rx frequency in Hz
) (
  input  logic                 clk_tx,
  input  logic                 rst_tx_n,
  input  logic                 start,
  input  logic [DATA_BITS-1:0] tx_data,
  output logic                 tx_out,
  output logic                 tx_busy,
  output logic                 tx_bit,          // bit being spread
  output logic                 tx_bit_en,       // last chip of each bit

  input  logic                 clk_rx,
  input  logic                 rst_rx_n,
  input  logic                 rx_in,
  output logic [DATA_BITS-1:0] rx_ctrl,
  output logic                 rx_frame_valid,
  output logic                 rx_synced,
  output logic                 rx_get,
  output logic                 rx_send,         // frame window open
  output logic                 rx_data_bit,     // recovered bit
  output logic                 rx_data_valid,   // recovered bit strobe
  output logic                 rx_rot_lead,
  output logic                 rx_rot_lag,
  output logic                 rx_acq_step,
  output logic [1:0]           buck_vsel,
  output logic                 led_p_gate,
  output logic                 led_n_gate,
  output logic                 m2_p_gate,
  output logic                 m2_n_gate,
  output logic                 m3_p_gate,
  output logic                 m3_n_gate
);

  dsss_tx u_tx (
    .clk(clk_tx), .rst_n(rst_tx_n), .start, .data(tx_data),
    .tx_out, .busy(tx_busy), .tx_bit, .bit_en(tx_bit_en)
  );

  dsss_rx u_rx (
    .clk(clk_rx), .rst_n(rst_rx_n), .rx_in, .ctrl(rx_ctrl), .frame_valid(rx_frame_valid),
    .synced(rx_synced), .get(rx_get), .send(rx_send), .data_bit(rx_data_bit),
    .data_valid(rx_data_valid), .rot_lead(rx_rot_lead), .rot_lag(rx_rot_lag),
    .acq_step(rx_acq_step)
  );

  backend_ctrl #(.FCLK_HZ(FCLK_HZ)) u_be (
    .clk(clk_rx), .rst_n(rst_rx_n), .con_valid(rx_frame_valid), .con(rx_ctrl[4:0]),
    .buck_vsel, .led_p_gate, .led_n_gate, .m2_p_gate, .m2_n_gate, .m3_p_gate, .m3_n_gate
  );

endmodule
