// ds_dpwm: delta-sigma digital pulse-width modulator.
//
// The document drives its power switches from a delta-sigma DPWM but gives
// no internals; this is the common first-order form. The duty word has
// CNT_W + DS_W bits. A CNT_W-bit counter sets the PWM period (2**CNT_W
// clocks); the upper CNT_W duty bits are the on-time of each period in
// clocks. The lower DS_W bits feed a first-order delta-sigma accumulator,
// updated once per period, whose carry lengthens that period's pulse by one
// clock. Averaged over 2**DS_W periods the duty resolution is therefore
// CNT_W + DS_W bits while the counter is only CNT_W bits. Duty 0 keeps the
// output low; the largest on-time is one clock short of a full period.
// period_start pulses on the first clock of every period.
module ds_dpwm #(
  parameter int unsigned CNT_W = 6,
  parameter int unsigned DS_W  = 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [CNT_W+DS_W-1:0] duty,
  output logic                  pwm,
  output logic                  period_start
);

  logic [CNT_W-1:0] cnt;
  logic [DS_W-1:0]  ds_acc;
  logic [CNT_W:0]   on_time;   // on-time of the current period, in clocks
  logic [DS_W:0]    ds_sum;

  assign ds_sum       = {1'b0, ds_acc} + {1'b0, duty[DS_W-1:0]};
  assign period_start = (cnt == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      ds_acc  <= '0;
      on_time <= '0;
    end else begin
      cnt <= cnt + 1'b1;
      if (cnt == '1) begin
        // Latch the next period's on-time at the period boundary.
        ds_acc  <= ds_sum[DS_W-1:0];
        on_time <= {1'b0, duty[CNT_W+DS_W-1:DS_W]} + (CNT_W+1)'(ds_sum[DS_W]);
      end
    end
  end

  assign pwm = ({1'b0, cnt} < on_time);

endmodule
