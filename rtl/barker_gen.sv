// barker_gen: 11-chip Barker code generator.
//
// A ring of eleven flip-flops whose last stage feeds the first, as in the
// document's circuit: reset/set values load the pattern BARKER_INIT, and each
// enabled clock rotates it one place to the right. The output flip-flop
// (bit 0) gives the chip sequence 0,0,0,1,1,1,0,1,1,0,1, repeating every 11
// enables. After reset the ring sits on the last chip of a bit (chip 10), so
// the first enable starts chip 0.
//
// Outputs: chip (current chip), chip_next (chip that the next enable will
// present), last (current chip is chip 10, the end of a data bit) and
// last_next (the next chip will be chip 10). The last/last_next decodes of
// the ring state are this design's addition; the receiver uses them to find
// bit boundaries without a separate chip counter.
module barker_gen
  import dsss_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic chip,
  output logic chip_next,
  output logic last,
  output logic last_next
);

  logic [10:0] ring;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  ring <= BARKER_INIT;
    else if (en) ring <= {ring[0], ring[10:1]};
  end

  assign chip      = ring[0];
  assign chip_next = ring[1];
  assign last      = (ring == BARKER_INIT);
  assign last_next = (ring == {BARKER_INIT[9:0], BARKER_INIT[10]});

endmodule
