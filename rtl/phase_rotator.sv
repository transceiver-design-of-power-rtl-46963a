// phase_rotator: the clock-phase mux of the CDR, as sampling strobes.
//
// The document switches three 1/3-chip-spaced phases Ph0..Ph2 onto three
// lines, Ph+ (early), Php (punctual) and Ph- (late), using a mux controlled
// by the one-hot phase-control state, and adds delay cells so the switch
// cannot race. This design stays in one clock domain: the muxed phases are
// still produced (ph_plus, ph_p, ph_m) for observation, but the logic that
// uses them runs on strobes in the fast clock domain:
//   tick_e : rising edge of Ph+, the chip boundary and early sampling point
//   tick_p : tick_e delayed 2 cycles (1/3 chip), the punctual sample
//   tick_m : tick_e delayed 4 cycles (2/3 chip), the late sample
// In steady state these coincide with the edges of the muxed Php and Ph-.
// Race guard (this design's stand-in for the document's delay circuits,
// whose circuit is not given): after each tick_e, further Ph+ edges are
// ignored for GUARD cycles. When sel moves one step later just after a
// tick, the new phase's edge 2 cycles later is therefore skipped and the
// chip stretches to 8 cycles (+1/3 chip); a step earlier gives a 4-cycle
// chip (-1/3 chip). sel must only change in the cycle after a tick_e.
module phase_rotator #(
  parameter int unsigned GUARD = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] ph,       // Ph2..Ph0 from the Johnson counter
  input  logic [2:0] sel,      // one-hot: sel[k] routes Phk to Ph+
  output logic       ph_plus,
  output logic       ph_p,
  output logic       ph_m,
  output logic       tick_e,
  output logic       tick_p,
  output logic       tick_m
);

  logic [2:0] ph_d;
  logic [2:0] guard_cnt;
  logic [3:0] tick_dly;
  logic       edge_sel;

  // Php is the phase after Ph+, Ph- the one after that.
  assign ph_plus = |(ph & sel);
  assign ph_p    = |(ph & {sel[1:0], sel[2]});
  assign ph_m    = |(ph & {sel[0], sel[2:1]});

  assign edge_sel = |(ph & ~ph_d & sel);
  assign tick_e   = edge_sel && (guard_cnt == '0);
  assign tick_p   = tick_dly[1];
  assign tick_m   = tick_dly[3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph_d      <= '0;
      guard_cnt <= '0;
      tick_dly  <= '0;
    end else begin
      ph_d     <= ph;
      tick_dly <= {tick_dly[2:0], tick_e};
      if (tick_e)              guard_cnt <= 3'(GUARD);
      else if (guard_cnt != 0) guard_cnt <= guard_cnt - 3'd1;
    end
  end

endmodule
