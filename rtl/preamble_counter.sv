// preamble_counter: bit sequencer of the transmitter.
//
// A bit counter numbers the bits of a burst 1..BURST_LEN (0 = idle). A start
// request is held until the next bit boundary (bit_en), where bit 1 begins.
// The preamble is the counter's least significant bit, 1010..., forced high
// from bit 42 on by a flag set at count 41, so bits 1..42 read 1010...1011.
// Control strobes, all qualified by bit_en (i.e. taking effect at the
// boundary into the named bit):
//   hold_load : into bit 40, copy the control word into the serializer's
//               holding register (the document's Clk/32 at count 40)
//   ser_sel   : into bit 43, load the serializer chain, so its first bit
//               is on the line during bit 43
//   use_data  : level, high during bits 43..BURST_LEN: the output mux
//               takes the serializer instead of the preamble
// The document uses a 6-bit counter that stops at 43; here the counter is
// 7 bits wide so that it also ends the 75-bit burst.
module preamble_counter
  import dsss_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       bit_en,
  input  logic       start,
  output logic [6:0] cnt,
  output logic       busy,
  output logic       preamble,
  output logic       hold_load,
  output logic       ser_sel,
  output logic       use_data
);

  logic start_pend;
  logic stuck;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt        <= '0;
      start_pend <= 1'b0;
      stuck      <= 1'b0;
    end else begin
      if (start && cnt == '0) start_pend <= 1'b1;
      if (bit_en) begin
        if (cnt == '0) begin
          if (start_pend || start) begin
            cnt        <= 7'd1;
            start_pend <= 1'b0;
          end
          stuck <= 1'b0;
        end else if (cnt == 7'(BURST_LEN)) begin
          cnt   <= '0;
          stuck <= 1'b0;
        end else begin
          cnt <= cnt + 7'd1;
          if (cnt == 7'(PREAMBLE_LEN - 1)) stuck <= 1'b1;
        end
      end
    end
  end

  assign busy      = (cnt != '0);
  assign preamble  = cnt[0] | stuck;
  assign hold_load = bit_en && (cnt == 7'(PREAMBLE_LEN - 3));
  assign ser_sel   = bit_en && (cnt == 7'(PREAMBLE_LEN));
  assign use_data  = (cnt > 7'(PREAMBLE_LEN));

endmodule
