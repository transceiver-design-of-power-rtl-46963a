// seq_detector: finds the sync pattern 1011 that closes the preamble.
//
// Overlapping Mealy detector, one step per recovered bit (en). States and
// arcs are the document's: S0 initial, S1 "got 1", S2 "got 10", S3 "got 101";
// S0 -1-> S1, S0 -0-> S0, S1 -1-> S1, S1 -0-> S2, S2 -1-> S3, S2 -0-> S0,
// S3 -0-> S2, S3 -1-> S1 with output 1. The preamble 1010...10 keeps it
// cycling S1/S2/S3 until the closing 11. get is that output, registered:
// a one-cycle pulse in the cycle after the en that completed the pattern.
// clear (this design's addition) returns the detector to S0 while the CDR
// is not locked, so that bits decided without lock are ignored.
module seq_detector
  import dsss_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic en,
  input  logic din,
  output logic get
);

  sd_state_t state, state_nx;
  logic      out_nx;

  always_comb begin
    state_nx = state;
    out_nx   = 1'b0;
    unique case (state)
      SD_S0: state_nx = din ? SD_S1 : SD_S0;
      SD_S1: state_nx = din ? SD_S1 : SD_S2;
      SD_S2: state_nx = din ? SD_S3 : SD_S0;
      SD_S3: begin state_nx = din ? SD_S1 : SD_S2; out_nx = din; end
      default: state_nx = SD_S0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= SD_S0;
      get   <= 1'b0;
    end else begin
      get <= en && out_nx && !clear;
      if (clear)   state <= SD_S0;
      else if (en) state <= state_nx;
    end
  end

endmodule
