// Closed-loop V/F speed controller for a three-phase induction motor.
//
// Data flow, one loop per speed window:
//   encoder A/B -> qep_speed (speed in rpm every 15 ms)
//     -> fuzzy_pi_ctrl (e, ce -> fuzzy rules -> incremental frequency command)
//     -> vf_profile (modulation index proportional to frequency)
// and, twice per 100 us switching period:
//   angle_gen (reference angle, sector, angle in sector)
//     -> svpwm_times (Ta, Tb, T0) -> svpwm_pwm (switching state {c,b,a})
//     -> three dead_band legs -> the six gate signals.
//
// Gate numbering follows the three-leg bridge: leg a is driven by PWM1 (upper
// switch S1) and PWM4 (lower, S4), leg b by PWM3 (S3) and PWM6 (S6), leg c by
// PWM5 (S5) and PWM2 (S2); pwm[n-1] is PWMn.
//
// The reference speed comes in on speed_ref (from the operator switches); the
// actual speed, frequency command and modulation index are brought out for a
// display or a D/A converter, and status carries the internal state of
// the loop and the modulator (see ctrl_status_t). Reset is synchronous and active high.
//
// The chain of blocks follows the drive's description; clock rate, encoder
// resolution, window length, dead band and loop gains are this design's
// choices and are parameters here.
module im_speed_ctrl_top
  import im_ctrl_pkg::*;
#(
  parameter int CLK_HZ       = 50_000_000,
  parameter int PWM_HZ       = 10_000,      // switching frequency
  parameter int SPEED_WINDOW = 750_000,     // clocks per speed measurement
  parameter int DEAD         = 50,          // dead band, clocks
  parameter int E_LOG2       = 9,
  parameter int CE_LOG2      = 7,
  parameter int KU           = 64,
  parameter int F_MAX        = 12800,       // Q8.8 Hz, 50 Hz
  parameter int M_RATED      = 59441,       // 0.907 in Q0.16
  parameter int F_RATED      = 12800        // Q8.8 Hz, 50 Hz
) (
  input  logic               clk,
  input  logic               rst,
  input  logic signed [15:0] speed_ref,     // rpm
  input  logic               qep_a,
  input  logic               qep_b,
  output logic [5:0]         pwm,           // pwm[n-1] = PWMn
  output logic signed [15:0] speed_act,     // rpm
  output logic               speed_valid,
  output logic [15:0]        f_cmd,         // Q8.8 Hz
  output logic [15:0]        mod_index,     // Q0.16
  output logic               qep_err,
  output ctrl_status_t       status
);

  localparam int HALF = CLK_HZ / (2 * PWM_HZ);

  // ---- speed loop ----
  logic        pi_update, pi_at_max, pi_at_min, vf_limited;
  logic [10:0] u_pos;
  logic signed [15:0] e, ce;

  qep_speed #(.W(16), .WINDOW(SPEED_WINDOW)) u_qep (
    .clk, .rst, .qa(qep_a), .qb(qep_b),
    .speed(speed_act), .valid(speed_valid), .err(qep_err)
  );

  fuzzy_pi_ctrl #(
    .W(16), .E_LOG2(E_LOG2), .CE_LOG2(CE_LOG2), .KU(KU),
    .F_MIN(0), .F_MAX(F_MAX), .F_INIT(0)
  ) u_fpi (
    .clk, .rst, .sample(speed_valid), .speed_ref, .speed_act,
    .f_cmd, .update(pi_update), .u_pos, .e, .ce,
    .at_max(pi_at_max), .at_min(pi_at_min)
  );

  vf_profile #(.M_RATED(M_RATED), .F_RATED(F_RATED)) u_vf (
    .clk, .rst, .f_cmd, .m(mod_index), .limited(vf_limited)
  );

  // ---- modulator ----
  logic        tick, ang_valid;
  logic [2:0]  sector, t_sector;
  logic [15:0] alpha, ta, tb, t0;
  sw_state_t   leg;

  angle_gen #(.TICK_HZ(2 * PWM_HZ)) u_ang (
    .clk, .rst, .f_cmd, .tick, .sector, .alpha, .angle(), .valid(ang_valid)
  );

  svpwm_times #(.HALF(HALF)) u_times (
    .clk, .rst, .valid_in(ang_valid), .m(mod_index), .sector, .alpha,
    .valid_out(), .sector_out(t_sector), .ta, .tb, .t0
  );

  svpwm_pwm #(.HALF(HALF)) u_pwm (
    .clk, .rst, .ta, .tb, .t0, .sector(t_sector),
    .tick, .leg, .cnt(), .up()
  );

  always_comb begin
    status.pi_update  = pi_update;
    status.pi_at_max  = pi_at_max;
    status.pi_at_min  = pi_at_min;
    status.vf_limited = vf_limited;
    status.u_pos      = u_pos;
    status.e          = e;
    status.ce         = ce;
    status.sector     = t_sector;
    status.tick       = tick;
    status.leg        = leg;
  end

  // ---- gate drive: leg a = PWM1/PWM4, b = PWM3/PWM6, c = PWM5/PWM2 ----
  dead_band #(.DEAD(DEAD)) u_db_a (.clk, .rst, .ref_in(leg[0]), .gate_hi(pwm[0]), .gate_lo(pwm[3]));
  dead_band #(.DEAD(DEAD)) u_db_b (.clk, .rst, .ref_in(leg[1]), .gate_hi(pwm[2]), .gate_lo(pwm[5]));
  dead_band #(.DEAD(DEAD)) u_db_c (.clk, .rst, .ref_in(leg[2]), .gate_hi(pwm[4]), .gate_lo(pwm[1]));

endmodule
