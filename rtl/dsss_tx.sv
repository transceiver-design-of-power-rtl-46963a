// dsss_tx: DSSS burst transmitter.
//
// Runs on the chip clock (one clk per chip). A free-running Barker
// generator spreads every bit into 11 chips; its end-of-bit decode is the
// bit clock. On start, at the next bit boundary, a 75-bit burst begins:
// the preamble 1010...1011 (bits 1..42), the 32-bit control word MSB first
// (bits 43..74, captured from data at the boundary into bit 40) and one
// fill bit 1 (bit 75). The output mux picks preamble or serializer, and the
// selected bit is XORed with the current chip. Between bursts the line is
// held at 0. busy is high during a burst.
module dsss_tx
  import dsss_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [DATA_BITS-1:0] data,
  output logic                 tx_out,
  output logic                 busy,
  output logic                 tx_bit,
  output logic                 bit_en
);

  logic chip, chip_next, last, last_next;
  logic [6:0] cnt;
  logic preamble, hold_load, ser_sel, use_data, sout;

  barker_gen u_barker (.clk, .rst_n, .en(1'b1), .chip, .chip_next, .last, .last_next);

  assign bit_en = last;

  preamble_counter u_pc (
    .clk, .rst_n, .bit_en, .start, .cnt, .busy, .preamble,
    .hold_load, .ser_sel, .use_data
  );

  serializer #(.NBITS(DATA_BITS)) u_ser (
    .clk, .rst_n, .en(bit_en), .hold_load, .sel(ser_sel), .b(data), .sout
  );

  assign tx_bit = use_data ? sout : preamble;
  assign tx_out = busy && (tx_bit ^ chip);

endmodule
