// serializer: 32-bit parallel-in, serial-out register of the transmitter.
//
// As in the document: a row of holding flip-flops captures the control word
// (hold_load, the document's Clk/32); a chain of 2-to-1 mux plus flip-flop
// stages is loaded from the holding row when sel is high and otherwise
// shifts towards the output, with a constant 1 entering the far end.
// b[31] is sent first, b[0] last, then 1s. Here the chain advances only on
// clocks with en (one per data bit) and hold_load is a one-cycle enable.
module serializer #(
  parameter int unsigned NBITS = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             hold_load,
  input  logic             sel,
  input  logic [NBITS-1:0] b,
  output logic             sout
);

  logic [NBITS-1:0] hold;
  logic [NBITS-1:0] chain;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold  <= '0;
      chain <= '1;
    end else begin
      if (hold_load) hold <= b;
      if (en)        chain <= sel ? hold : {chain[NBITS-2:0], 1'b1};
    end
  end

  assign sout = chain[NBITS-1];

endmodule
