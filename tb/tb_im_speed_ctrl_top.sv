// End-to-end test bench of im_speed_ctrl_top at its default parameters
// (50 MHz clock, 10 kHz switching, 15 ms speed window), closed through the
// behavioural inverter / motor / encoder model.
//
// Sequence: 1000 rpm without load, full load applied, 1200 rpm with full
// load, load removed at 1200 rpm, 1700 rpm (beyond the 1500 rpm reachable at 50 Hz, so the frequency
// command and the modulation index saturate), then 0 rpm (the command is
// clipped at zero). Checked:
//   - speed within 5 % of the reference at the end of each reachable step;
//   - stator frequency recovered from the gate signals equals the command;
//   - fundamental voltage over frequency constant: |v| = m / pi with
//     m = 0.907 f / 50 Hz (Vdc = 1), corrected for the model's filter;
//   - the two gates of a leg are never on together;
//   - each mechanism occurs at least once: dead band, all six sectors,
//     fuzzy updates, error beyond the universe, clipping at F_MAX and at
//     zero, V/F limit.
// Settling times (5 % band) are printed.
module tb_im_speed_ctrl_top;
  timeunit 1ns;
  timeprecision 1ps;
  import im_ctrl_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic signed [15:0] speed_ref = 0, speed_act;
  logic qep_a, qep_b, speed_valid, qep_err;
  logic [5:0] pwm;
  logic [15:0] f_cmd, mod_index;
  ctrl_status_t status;
  real load = 0.0, speed_rpm, f_est, v_mag;
  longint cyc = 0;

  // mechanism counters
  int n_dead = 0, n_update = 0, n_at_max = 0, n_at_min = 0, n_vf_lim = 0, n_e_sat = 0;
  int sector_seen [8];
  int n_overlap = 0;

  im_speed_ctrl_top dut (
    .clk, .rst, .speed_ref, .qep_a, .qep_b, .pwm, .speed_act, .speed_valid,
    .f_cmd, .mod_index, .qep_err, .status
  );

  induction_motor_model motor (
    .clk, .pwm, .load, .qa(qep_a), .qb(qep_b), .speed_rpm, .f_est, .v_mag
  );

  always #10 clk = ~clk;     // 50 MHz

  initial begin
    #8000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    cyc++;
    if ((pwm[0] && pwm[3]) || (pwm[2] && pwm[5]) || (pwm[4] && pwm[1])) n_overlap++;
    if (!pwm[0] && !pwm[3]) n_dead++;
    sector_seen[status.sector]++;
    if (status.pi_update) begin
      n_update++;
      if (status.pi_at_max) n_at_max++;
      if (status.pi_at_min) n_at_min++;
      if (status.e > 16'sd512 || status.e < -16'sd512) n_e_sat++;
    end
    if (status.vf_limited) n_vf_lim++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // run for a time, tracking when the speed last left the 5 % band
  task automatic run_step(input int ref_rpm, input real ld, input real seconds,
                          input bit reachable, input string name);
    longint t0_cyc, last_out;
    real band, f_c, m_exp, v_exp, w;
    speed_ref = 16'(ref_rpm);
    load = ld;
    t0_cyc = cyc;
    last_out = cyc;
    band = 0.05 * real'(ref_rpm);
    while (real'(cyc - t0_cyc) * 20.0e-9 < seconds) begin
      @(posedge speed_valid);
      @(negedge clk);
      if ((real'(speed_act) - real'(ref_rpm)) > band || (real'(ref_rpm) - real'(speed_act)) > band)
        last_out = cyc;
    end
    $display("%s: speed %0d rpm (model %0.1f), f_cmd %0.2f Hz, f from gates %0.2f Hz, m %0.3f, settled after %0.3f s",
             name, speed_act, speed_rpm, real'(f_cmd) / 256.0, f_est, real'(mod_index) / 65536.0,
             real'(last_out - t0_cyc) * 20.0e-9);
    f_c = real'(f_cmd) / 256.0;
    if (reachable) begin
      check((real'(speed_act) - real'(ref_rpm)) <= band && (real'(ref_rpm) - real'(speed_act)) <= band,
            {name, ": speed outside 5 % band"});
      check(real'(last_out - t0_cyc) * 20.0e-9 < seconds - 0.2, {name, ": not settled"});
    end
    check(f_est - f_c < 0.5 && f_c - f_est < 0.5, {name, ": gate frequency differs from command"});
    if (f_c > 5.0) begin
      m_exp = 0.907 * (f_c > 50.0 ? 50.0 : f_c) / 50.0;
      w = 2.0 * 3.14159265358979 * f_c * 1.0e-3;
      v_exp = m_exp / 3.14159265358979 / $sqrt(1.0 + w * w);
      $display("%s: fundamental |v| %0.4f Vdc, expected %0.4f", name, v_mag, v_exp);
      check(v_mag > 0.95 * v_exp && v_mag < 1.05 * v_exp, {name, ": V/F ratio"});
    end
  endtask

  initial begin
    foreach (sector_seen[k]) sector_seen[k] = 0;
    repeat (5) @(negedge clk);
    rst = 0;
    run_step(1000, 0.0, 1.5, 1, "1000 rpm, no load");
    run_step(1000, 1.0, 0.8, 1, "1000 rpm, full load");
    run_step(1200, 1.0, 1.5, 1, "1200 rpm, full load");
    run_step(1200, 0.0, 1.0, 1, "1200 rpm, load removed");
    run_step(1700, 0.0, 0.9, 0, "1700 rpm, beyond rated");
    check(f_cmd == 16'd12800 && mod_index == 16'd59441, "command not held at 50 Hz / 0.907");
    run_step(0, 0.0, 1.5, 0, "stop");
    check(f_cmd == 16'd0, "command not at zero");
    check(n_overlap == 0, "both gates of a leg on together");
    check(!qep_err, "encoder decoding error");
    $display("mechanisms: dead band %0d clocks, fuzzy updates %0d, error beyond universe %0d, clipped at max %0d, at zero %0d, V/F limit %0d clocks",
             n_dead, n_update, n_e_sat, n_at_max, n_at_min, n_vf_lim);
    check(n_dead > 0, "dead band never occurred");
    check(n_update > 0, "controller never updated");
    check(n_e_sat > 0, "error never beyond the universe");
    check(n_at_max > 0, "frequency command never clipped at maximum");
    check(n_at_min > 0, "frequency command never clipped at zero");
    check(n_vf_lim > 0, "V/F limit never reached");
    for (int k = 1; k <= 6; k++) check(sector_seen[k] > 0, $sformatf("sector %0d never modulated", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
