// Behavioural model of the power stage, the motor and its encoder, for test
// benches only (not synthesizable).
//
// Inverter: each leg's output follows its upper gate (1 = +Vdc) or lower
// gate (0); while both gates are off (dead band) the leg keeps its last
// level. Vdc is normalised to 1. The phase voltages give the stator voltage
// space vector v = 2/3 (va + a vb + a^2 vc), which is low-pass filtered (time
// constant TAU_V) to recover its fundamental. Its rotation rate is the
// stator frequency f_est (Hz) and its length v_mag.
//
// Motor: a 4-pole machine, synchronous speed 30 rpm per Hz; the rotor speed
// follows synchronous speed minus a slip proportional to the load with a
// first-order mechanical time constant TAU_M. Full load costs SLIP_FULL rpm.
//
// Encoder: 1000 lines, four steps per line, quadrature outputs qa, qb with A
// leading for forward rotation.
module induction_motor_model #(
  parameter real TAU_V     = 1.0e-3,
  parameter real TAU_M     = 0.25,
  parameter real SLIP_NL   = 15.0,
  parameter real SLIP_FULL = 75.0,
  parameter real CLK_NS    = 20.0
) (
  input  logic       clk,
  input  logic [5:0] pwm,         // pwm[n-1] = PWMn
  input  real        load,        // 0.0 .. 1.0 of full load
  output logic       qa,
  output logic       qb,
  output real        speed_rpm,
  output real        f_est,
  output real        v_mag
);

  localparam real DT = CLK_NS * 1.0e-9;
  localparam real PI = 3.14159265358979;
  localparam int  UPD = 50;                 // mechanical update every UPD clocks

  real vf_a = 0.0, vf_b = 0.0;              // filtered alpha/beta voltage
  real ang_prev = 0.0, ang_acc = 0.0, pos = 0.0;
  logic [2:0] lv = 3'b000;                  // leg levels {c, b, a}
  int div = 0, phase = 0;
  real f_win = 0.0;
  int  win = 0;

  initial begin
    speed_rpm = 0.0; f_est = 0.0; v_mag = 0.0; qa = 0; qb = 0;
  end

  always @(posedge clk) begin
    logic [2:0] nl;
    real va, vb, vc, v_al, v_be, ang, d, n_sync, slip, steps_new;
    nl = lv;
    if (pwm[0]) nl[0] = 1'b1; else if (pwm[3]) nl[0] = 1'b0;
    if (pwm[2]) nl[1] = 1'b1; else if (pwm[5]) nl[1] = 1'b0;
    if (pwm[4]) nl[2] = 1'b1; else if (pwm[1]) nl[2] = 1'b0;
    lv = nl;
    va = real'(nl[0]); vb = real'(nl[1]); vc = real'(nl[2]);
    v_al = 2.0 / 3.0 * (va - 0.5 * vb - 0.5 * vc);
    v_be = 2.0 / 3.0 * ($sqrt(3.0) / 2.0) * (vb - vc);
    vf_a = vf_a + (v_al - vf_a) * DT / TAU_V;
    vf_b = vf_b + (v_be - vf_b) * DT / TAU_V;
    div++;
    if (div >= UPD) begin
      div = 0;
      v_mag = $sqrt(vf_a * vf_a + vf_b * vf_b);
      ang = $atan2(vf_b, vf_a);
      d = ang - ang_prev;
      if (d > PI) d = d - 2.0 * PI;
      if (d < -PI) d = d + 2.0 * PI;
      ang_prev = ang;
      if (v_mag < 1.0e-3) d = 0.0;
      // stator frequency averaged over 1 ms
      f_win = f_win + d;
      win++;
      if (real'(win) * UPD * DT >= 1.0e-3) begin
        f_est = f_win / (2.0 * PI) / (real'(win) * UPD * DT);
        f_win = 0.0;
        win = 0;
      end
      n_sync = 30.0 * f_est;
      slip = (n_sync > 1.0) ? SLIP_NL + (SLIP_FULL - SLIP_NL) * load : 0.0;
      speed_rpm = speed_rpm + ((n_sync - slip > 0.0 ? n_sync - slip : 0.0) - speed_rpm) * UPD * DT / TAU_M;
      // encoder: 4000 steps per revolution
      steps_new = pos + speed_rpm / 60.0 * 4000.0 * UPD * DT;
      pos = steps_new;
    end
    if ($floor(pos) > real'(phase)) begin
      phase++;
      qa <= ((phase % 4) == 1 || (phase % 4) == 2);
      qb <= ((phase % 4) == 2 || (phase % 4) == 3);
    end
  end

endmodule
