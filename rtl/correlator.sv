// correlator: despreader and integrate-and-dump for one sampling phase.
//
// On every strobe the sampled chip is XORed with the local Barker chip and
// the 4-bit accumulator counts the ones (the document builds it from four
// half adders and four flip-flops; that is a counter). On the strobe of the
// last chip of a bit (last = 1) the count, including that chip, is dumped
// into a 4-bit register and the accumulator restarts: one dump per 11 chips.
// The dumped count X goes through the absolute-value circuit (|2X-11|) and a
// magnitude comparator; td is high when the magnitude exceeds THRESH (3 in
// the document: aligned code gives 11, 9, 7 or 5 with up to three chip
// errors, a misaligned Barker code gives 1). dump is a one-cycle pulse in
// the cycle after the dumping strobe, when sum, mag and td are new.
// The sampling flip-flop of the document is the caller's strobe: sample is
// read on the strobe cycle.
module correlator
  import dsss_pkg::*;
#(
  parameter int unsigned THRESH = ACQ_THRESH
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       strobe,
  input  logic       sample,
  input  logic       chip,
  input  logic       last,
  output logic [3:0] sum,
  output logic [3:0] mag,
  output logic       td,
  output logic       dump
);

  logic [3:0] acc;
  logic [3:0] acc_next;

  assign acc_next = acc + 4'(sample ^ chip);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
      sum  <= '0;
      dump <= 1'b0;
    end else begin
      dump <= 1'b0;
      if (strobe) begin
        if (last) begin
          sum  <= acc_next;
          acc  <= '0;
          dump <= 1'b1;
        end else begin
          acc  <= acc_next;
        end
      end
    end
  end

  abs_value u_abs (.x(sum), .y(mag));

  assign td = (mag > 4'(THRESH));

  assert property (@(posedge clk) disable iff (!rst_n) acc <= 4'd11);

endmodule
