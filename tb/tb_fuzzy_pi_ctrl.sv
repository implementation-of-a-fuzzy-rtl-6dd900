// Test bench for fuzzy_pi_ctrl: applies speed samples and checks each change
// of the frequency command against a floating-point model of the controller
// (triangular labels over [-1,1] and [-3,3], the 7x7 rule table, centre of
// gravity, increment KU * (u - z)). Also checks: zero error holds the
// command, the 52-cycle latency from sample to update, clipping at F_MAX and
// at zero with the at_max / at_min flags.
module tb_fuzzy_pi_ctrl;
  timeunit 1ns;
  timeprecision 1ps;
  localparam int KU = 64, F_MAX = 12800;
  int checks = 0, failures = 0, n_max = 0, n_min = 0;
  logic clk = 0, rst = 1, sample = 0, update, at_max, at_min;
  logic signed [15:0] speed_ref, speed_act, e, ce;
  logic [15:0] f_cmd;
  logic [10:0] u_pos;
  real prev_e = 0.0;

  fuzzy_pi_ctrl #(.E_LOG2(9), .CE_LOG2(7), .KU(KU), .F_MAX(F_MAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real tri_mu(input real x, input real fs, input int j);
    real p, d;
    p = (x + fs) / (2.0 * fs) * 6.0;
    if (p < 0.0) p = 0.0;
    if (p > 6.0) p = 6.0;
    d = p - real'(j);
    if (d < 0.0) d = -d;
    return (d >= 1.0) ? 0.0 : 1.0 - d;
  endfunction

  function automatic int clamp6(input int v);
    return v < 0 ? 0 : (v > 6 ? 6 : v);
  endfunction

  // expected u on the label axis (0..1536)
  function automatic real model_u(input real ev, input real cev);
    real num = 0.0, den = 0.0, w;
    for (int i = 0; i < 7; i++)
      for (int j = 0; j < 7; j++) begin
        w = tri_mu(ev, 512.0, i) * tri_mu(cev, 128.0, j);
        num += w * real'(clamp6(i + j - 3) * 256);
        den += w;
      end
    return num / den;
  endfunction

  task automatic step(input int r, input int a);
    real ev, cev, exp_step, exp_f;
    int lat, f_old;
    f_old = int'(f_cmd);
    ev = real'(r - a);
    cev = ev - prev_e;
    prev_e = ev;
    exp_step = real'(KU) * (model_u(ev, cev) - 768.0) / 256.0;
    exp_f = real'(f_old) + exp_step;
    @(negedge clk);
    speed_ref = 16'(r); speed_act = 16'(a); sample = 1;
    @(negedge clk);
    sample = 0;
    lat = 0;                       // clock edges since the sampling edge
    while (!update && lat < 100) begin
      @(negedge clk);
      lat++;
    end
    checks++;
    if (lat != 52) begin
      failures++;
      $display("FAIL latency %0d", lat);
    end
    if (exp_f > real'(F_MAX)) begin
      exp_f = real'(F_MAX);
      checks++;
      if (!at_max) failures++;
      n_max++;
    end
    if (exp_f < 0.0) begin
      exp_f = 0.0;
      checks++;
      if (!at_min) failures++;
      n_min++;
    end
    checks++;
    if (real'(f_cmd) > exp_f + 2.0 || real'(f_cmd) < exp_f - 2.0) begin
      failures++;
      $display("FAIL r=%0d a=%0d e=%f ce=%f: f %0d -> %0d, expected %f", r, a, ev, cev, f_old, f_cmd, exp_f);
    end
  endtask

  initial begin
    speed_ref = 0; speed_act = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    // zero error: command holds at zero, output at z
    step(0, 0);
    checks++;
    if (u_pos != 768 || f_cmd != 0) failures++;
    // large error: full step up each sample, until clipped at F_MAX
    for (int n = 0; n < 70; n++) step(1500, 0);
    // mid error on the ps/pm boundary, ce = 0
    step(900, 644);
    step(900, 644);
    // overshoot: command falls until clipped at zero
    for (int n = 0; n < 70; n++) step(0, 1500);
    // random operating points
    for (int n = 0; n < 300; n++) step($urandom_range(1500), $urandom_range(1500));
    checks++;
    if (n_max == 0 || n_min == 0) begin
      failures++;
      $display("FAIL clipping not exercised: %0d %0d", n_max, n_min);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
