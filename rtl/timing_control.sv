// timing_control: frames the 32 control bits that follow the sync pattern.
//
// A get pulse from the sequence detector sets send, which enables the
// divide-by-32 bit counter and the deserializer's shift register. Each
// recovered bit (en) while send is high is counted; after the 32nd the
// counter's terminal count gives one load pulse (the document's Clk/32,
// which moves the shifted word to the output register) and send is cleared
// until the next get. Gets that arrive while send is high are ignored. In
// the document the same behaviour comes from a flip-flop clocked by Get and
// a short flip-flop chain that resets it after Clk/32; here it is a
// synchronous counter with enables. load is registered: it comes in the
// cycle after the en of the last bit.
// clear (this design's addition, driven by loss of CDR lock) abandons a
// window in progress, so that a sync pattern seen in the last bits of a
// burst cannot make the next burst's preamble be taken as data.
module timing_control #(
  parameter int unsigned NBITS = 32
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic get,
  input  logic clear,
  output logic send,
  output logic load
);

  logic [$clog2(NBITS)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      send <= 1'b0;
      load <= 1'b0;
      cnt  <= '0;
    end else begin
      load <= 1'b0;
      if (clear) begin
        send <= 1'b0;
        cnt  <= '0;
      end else if (!send) begin
        cnt <= '0;
        if (get) send <= 1'b1;
      end else if (en) begin
        if (cnt == ($clog2(NBITS))'(NBITS - 1)) begin
          send <= 1'b0;
          load <= 1'b1;
          cnt  <= '0;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

endmodule
