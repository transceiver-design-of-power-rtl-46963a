// backend_ctrl: turns received control codes into switch-drive signals.
//
// Each received word carries a 5-bit code con = word[4:0]; the code table
// is the document's:
//   0..3   buck converter target 1.5 V, 3 V, 5 V, 9 V (buck_vsel = code)
//   4..6   PMOS LED dimming 20/50/80 %       14..16 NMOS LED dimming 20/50/80 %
//   7..10  PMOS LED flashing 6/3/1.5/0.75 Hz  17..20 NMOS LED flashing, same
//   11..13 PMOS LED on-time 20/50/80 %        21..23 NMOS LED on-time, same
//   24 motor s2: PMOS on, NMOS off           28 motor s3: PMOS on, NMOS off
//   29..31 motor s2: PMOS off, NMOS 20/50/80 %
//   25..27 motor s3: PMOS off, NMOS 20/50/80 %
// A code changes only the setting it names; the others are kept.
// Each LED gate is (flash window) AND (dimming PWM). The flash window is
// high for the on-time fraction of each flashing period, counted in clk
// cycles from FCLK_HZ; dimming and motor speed use delta-sigma DPWMs with
// an 8-bit duty (20/50/80 % = 51/128/205 of 256).
// Choices of this design (the document does not say): after reset the LEDs
// and motors are off and the buck target is code 0; an LED turns on with the
// first code for it; until set, dimming is full (no PWM), the flash
// frequency is 'steady' (window always open) and on-time is 50 %. Choosing
// a flash frequency restarts the flash period. The buck converter's own
// regulation loop is not modelled: buck_vsel is its target selection.
module backend_ctrl #(
  parameter int unsigned FCLK_HZ = 1_562_500   // clk frequency in Hz
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       con_valid,
  input  logic [4:0] con,
  output logic [1:0] buck_vsel,
  output logic       led_p_gate,
  output logic       led_n_gate,
  output logic       m2_p_gate,
  output logic       m2_n_gate,
  output logic       m3_p_gate,
  output logic       m3_n_gate
);

  typedef struct packed {
    logic       on;
    logic       dim_full;
    logic [7:0] dim;
    logic [2:0] freq;     // 0 steady, 1..4 = 6, 3, 1.5, 0.75 Hz
    logic [1:0] ontime;   // 0..2 = 20, 50, 80 %
  } led_cfg_t;

  typedef struct packed {
    logic       p_on;
    logic [7:0] n_duty;
  } motor_cfg_t;

  // Duty words for 20, 50, 80 %.
  function automatic logic [7:0] pct_duty(input logic [1:0] i);
    case (i)
      2'd0:    return 8'd51;
      2'd1:    return 8'd128;
      default: return 8'd205;
    endcase
  endfunction

  // Flashing period in clk cycles: FCLK_HZ / f with f = 6, 3, 1.5, 0.75 Hz.
  function automatic logic [31:0] flash_period(input logic [2:0] f);
    case (f)
      3'd1:    return 32'((64'(FCLK_HZ) * 4) / 24);
      3'd2:    return 32'((64'(FCLK_HZ) * 4) / 12);
      3'd3:    return 32'((64'(FCLK_HZ) * 4) / 6);
      default: return 32'((64'(FCLK_HZ) * 4) / 3);
    endcase
  endfunction

  // On-window length: period * {20, 50, 80} / 100.
  function automatic logic [31:0] flash_on(input logic [2:0] f, input logic [1:0] o);
    logic [63:0] p;
    p = 64'(flash_period(f));
    case (o)
      2'd0:    return 32'((p * 20) / 100);
      2'd1:    return 32'((p * 50) / 100);
      default: return 32'((p * 80) / 100);
    endcase
  endfunction

  led_cfg_t   led_p, led_n;
  motor_cfg_t m2, m3;
  logic       restart_p, restart_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buck_vsel <= '0;
      led_p     <= '{on: 1'b0, dim_full: 1'b1, dim: 8'd0, freq: 3'd0, ontime: 2'd1};
      led_n     <= '{on: 1'b0, dim_full: 1'b1, dim: 8'd0, freq: 3'd0, ontime: 2'd1};
      m2        <= '0;
      m3        <= '0;
      restart_p <= 1'b0;
      restart_n <= 1'b0;
    end else begin
      restart_p <= 1'b0;
      restart_n <= 1'b0;
      if (con_valid) begin
        if (con <= 5'd3) begin
          buck_vsel <= con[1:0];
        end else if (con <= 5'd6) begin
          led_p.on <= 1'b1; led_p.dim_full <= 1'b0; led_p.dim <= pct_duty(2'(con - 5'd4));
        end else if (con <= 5'd10) begin
          led_p.on <= 1'b1; led_p.freq <= 3'(con - 5'd6); restart_p <= 1'b1;
        end else if (con <= 5'd13) begin
          led_p.on <= 1'b1; led_p.ontime <= 2'(con - 5'd11);
        end else if (con <= 5'd16) begin
          led_n.on <= 1'b1; led_n.dim_full <= 1'b0; led_n.dim <= pct_duty(2'(con - 5'd14));
        end else if (con <= 5'd20) begin
          led_n.on <= 1'b1; led_n.freq <= 3'(con - 5'd16); restart_n <= 1'b1;
        end else if (con <= 5'd23) begin
          led_n.on <= 1'b1; led_n.ontime <= 2'(con - 5'd21);
        end else if (con == 5'd24) begin
          m2 <= '{p_on: 1'b1, n_duty: 8'd0};
        end else if (con <= 5'd27) begin
          m3 <= '{p_on: 1'b0, n_duty: pct_duty(2'(con - 5'd25))};
        end else if (con == 5'd28) begin
          m3 <= '{p_on: 1'b1, n_duty: 8'd0};
        end else begin
          m2 <= '{p_on: 1'b0, n_duty: pct_duty(2'(con - 5'd29))};
        end
      end
    end
  end

  // Flash windows.
  logic [31:0] fcnt_p, fcnt_n;
  logic        win_p, win_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fcnt_p <= '0;
      fcnt_n <= '0;
    end else begin
      if (restart_p || fcnt_p >= flash_period(led_p.freq) - 1) fcnt_p <= '0;
      else                                                   fcnt_p <= fcnt_p + 1;
      if (restart_n || fcnt_n >= flash_period(led_n.freq) - 1) fcnt_n <= '0;
      else                                                   fcnt_n <= fcnt_n + 1;
    end
  end

  assign win_p = (led_p.freq == '0) || (fcnt_p < flash_on(led_p.freq, led_p.ontime));
  assign win_n = (led_n.freq == '0) || (fcnt_n < flash_on(led_n.freq, led_n.ontime));

  // Delta-sigma DPWMs for dimming and motor speed.
  logic dim_p_pwm, dim_n_pwm, m2_pwm, m3_pwm;
  logic ps_dp, ps_dn, ps_m2, ps_m3;

  ds_dpwm u_dim_p (.clk, .rst_n, .duty(led_p.dim), .pwm(dim_p_pwm), .period_start(ps_dp));
  ds_dpwm u_dim_n (.clk, .rst_n, .duty(led_n.dim), .pwm(dim_n_pwm), .period_start(ps_dn));
  ds_dpwm u_m2    (.clk, .rst_n, .duty(m2.n_duty), .pwm(m2_pwm),    .period_start(ps_m2));
  ds_dpwm u_m3    (.clk, .rst_n, .duty(m3.n_duty), .pwm(m3_pwm),    .period_start(ps_m3));

  assign led_p_gate = led_p.on && win_p && (led_p.dim_full || dim_p_pwm);
  assign led_n_gate = led_n.on && win_n && (led_n.dim_full || dim_n_pwm);
  assign m2_p_gate  = m2.p_on;
  assign m2_n_gate  = m2_pwm;
  assign m3_p_gate  = m3.p_on;
  assign m3_n_gate  = m3_pwm;

endmodule
