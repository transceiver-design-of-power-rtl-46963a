// deserializer: 32-bit serial-in, parallel-out register.
//
// A shift register takes one bit per enabled clock (en and shift both
// high); the first bit received ends in b[31], matching a serializer that
// sends b[31] first. On load the shifted word is copied into the output
// register, which holds the last control word until the next one, as in the
// document's two-row structure (shift row on Clk, output row on Clk/32).
// valid pulses in the cycle after the output register changes.
module deserializer #(
  parameter int unsigned NBITS = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             shift,
  input  logic             din,
  input  logic             load,
  output logic [NBITS-1:0] b,
  output logic             valid
);

  logic [NBITS-1:0] sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh    <= '0;
      b     <= '0;
      valid <= 1'b0;
    end else begin
      valid <= load;
      if (en && shift) sh <= {sh[NBITS-2:0], din};
      if (load)        b  <= sh;
    end
  end

endmodule
