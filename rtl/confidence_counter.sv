// confidence_counter: continuous-type confidence counter (digital loop
// filter of the code-tracking loop).
//
// States S0 (centre), S1..S(N-1) to the right and S(N+1)..S(2N-2) to the
// left; here they are held as a signed position pos: 0 is S0, +k is Sk on
// the right (S1, S2) and -k the k-th state on the left (S3, S4 for N = 3).
// Following the document's continuous-type diagram, R moves one step right
// from S0 or a right-hand state and returns to S0 from a left-hand state;
// L does the mirror image. The N-th R in a row (from S(N-1)) returns to S0
// and raises r_ov; likewise the N-th L raises l_ov. So an overflow needs N
// consecutive requests in the same direction, which filters out jitter but
// follows a steady drift. N = 3 is the document's size.
// The document's circuit is one-hot and shifts on every clock; here the
// counter moves only on a clock with en and exactly one of r, l (no request
// holds the state: this design's choice). clear returns it to S0.
// r_ov / l_ov are registered one-cycle pulses.
module confidence_counter
  import dsss_pkg::*;
#(
  parameter int unsigned N = CONF_N
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic en,
  input  logic r,
  input  logic l,
  output logic r_ov,
  output logic l_ov,
  output logic signed [7:0] pos
);

  localparam logic signed [7:0] EDGE = 8'(N - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos  <= '0;
      r_ov <= 1'b0;
      l_ov <= 1'b0;
    end else begin
      r_ov <= 1'b0;
      l_ov <= 1'b0;
      if (clear) begin
        pos <= '0;
      end else if (en && (r ^ l)) begin
        if (r) begin
          if (pos < 0)          pos <= '0;
          else if (pos == EDGE) begin pos <= '0; r_ov <= 1'b1; end
          else                  pos <= pos + 8'sd1;
        end else begin
          if (pos > 0)          pos <= '0;
          else if (pos == -EDGE) begin pos <= '0; l_ov <= 1'b1; end
          else                  pos <= pos - 8'sd1;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(r_ov && l_ov));

endmodule
