// setpoint_manager: operation modes, references and the power-flow sign.
//
// Mode 0 (open loop): the reference angle turns at a fixed electrical
//   frequency, a 12-bit phase accumulator advanced by delta_fit_0 once per
//   switching period (f = 5 kHz * delta_fit_0 / 4096: 41 gives 50.05 Hz,
//   2 gives 2.44 Hz), and the modulation index is the user's m_user.
// Mode 1 (current loop): iq* = iq_user; m* and theta* come from the current
//   loops through the polar converter, theta* following the encoder angle.
// Mode 2 (speed loop): iq* is the output of the speed PI compensator, which
//   runs on every new speed measurement with w* = speed_ref.
// The power-flow sign `pow` is the sign of the active power dd*id + dq*iq,
// which the modulator needs for the dc-link balance. The three modes, the
// open-loop frequency law and the existence of the power sign follow the
// description; the power formula, the widths and the clearing of the speed
// integrator outside mode 2 are this design's choices.
//
// Timing: theta_ol changes one cycle after `tick`; iq_ref one cycle after
// speed_valid; m_star/theta_star are combinational selections of registers.
module setpoint_manager
  import mac_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     tick,          // start of switching period
  input  mode_e                    mode,
  input  logic [MOD_W-1:0]         m_user,
  input  logic [7:0]               delta_fit_0,
  input  logic signed [DQ_W-1:0]   iq_user,
  input  logic signed [SPD_W-1:0]  speed_ref,
  input  logic signed [SPD_W-1:0]  speed,
  input  logic                     speed_valid,
  input  logic [7:0]               kp_w,
  input  logic [7:0]               ki_w,
  // closed-loop results
  input  logic [MOD_W-1:0]         m_polar,
  input  angle_t                   theta_polar,
  input  logic signed [DUTY_W-1:0] dd,
  input  logic signed [DUTY_W-1:0] dq,
  input  logic signed [DQ_W-1:0]   id,
  input  logic signed [DQ_W-1:0]   iq,
  // outputs
  output logic signed [DQ_W-1:0]   iq_ref,
  output logic [MOD_W-1:0]         m_star,
  output angle_t                   theta_star,
  output logic                     pow,
  output logic                     loops_clear   // hold the current integrators in mode 0
);
  logic [11:0] acc;
  logic signed [DQ_W-1:0] iq_w;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) acc <= '0;
    else if (tick) acc <= acc + 12'(delta_fit_0);

  pi_compensator #(.IN_W(SPD_W), .OUT_W(DQ_W), .KP_SHIFT(2), .KI_SHIFT(6)) u_speed_pi (
    .clk, .rst_n, .en(speed_valid), .clear(mode != MODE_SPEED), .ref_in(speed_ref), .fb(speed),
    .kp(kp_w), .ki(ki_w), .y(iq_w), .valid());

  always_comb begin
    unique case (mode)
      MODE_CURRENT: iq_ref = iq_user;
      MODE_SPEED:   iq_ref = iq_w;
      default:      iq_ref = '0;
    endcase
    if (mode == MODE_OPEN) begin
      m_star     = m_user;
      theta_star = angle_t'(acc >> 2);
    end else begin
      m_star     = m_polar;
      theta_star = theta_polar;
    end
    loops_clear = (mode == MODE_OPEN);
  end

  logic signed [DQ_W+DUTY_W+1:0] p;
  always_comb p = (DQ_W + DUTY_W + 2)'(dd) * (DQ_W + DUTY_W + 2)'(id)
                + (DQ_W + DUTY_W + 2)'(dq) * (DQ_W + DUTY_W + 2)'(iq);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) pow <= 1'b1;
    else if (tick) pow <= ~p[DQ_W+DUTY_W+1];
endmodule
