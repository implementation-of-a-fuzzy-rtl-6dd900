// Test bench for fuzzifier: sweeps the input across and beyond the universe
// for two universe sizes and compares every membership with the triangle
// max(0, 1 - |p - j|), p the input's position on the 0..6 label axis, worked
// out in floating point. Also checks that the memberships sum to 1.0 and
// that at most two labels are active.
module tb_fuzzifier;
  timeunit 1ns;
  timeprecision 1ps;
  import im_ctrl_pkg::*;

  int checks = 0, failures = 0;
  logic signed [15:0] x;
  mu_vec_t mu9, mu7;

  fuzzifier #(.IN_W(16), .HALF_LOG2(9)) dut9 (.x(x), .mu(mu9));
  fuzzifier #(.IN_W(16), .HALF_LOG2(7)) dut7 (.x(x), .mu(mu7));

  task automatic check_one(input mu_vec_t mu, input int fs, input int xv);
    real p, exp_mu;
    int sum, active;
    p = (real'(xv) + real'(fs)) / (2.0 * real'(fs)) * 6.0;
    if (p < 0.0) p = 0.0;
    if (p > 6.0) p = 6.0;
    sum = 0; active = 0;
    for (int j = 0; j < 7; j++) begin
      exp_mu = 1.0 - ((p - j) < 0 ? (j - p) : (p - j));
      if (exp_mu < 0.0) exp_mu = 0.0;
      exp_mu = exp_mu * 256.0;
      checks++;
      if ((real'(mu[j]) - exp_mu) > 1.01 || (exp_mu - real'(mu[j])) > 1.01) begin
        failures++;
        $display("FAIL fs=%0d x=%0d label %0d: got %0d expected %f", fs, xv, j, mu[j], exp_mu);
      end
      sum += int'(mu[j]);
      if (mu[j] != 0) active++;
    end
    checks++;
    if (sum != 256 || active > 2) begin
      failures++;
      $display("FAIL fs=%0d x=%0d: sum %0d active %0d", fs, xv, sum, active);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -700; v <= 700; v += 3) begin
      x = 16'(v);
      #1;
      check_one(mu9, 512, v);
      check_one(mu7, 128, v);
    end
    // exact label centres
    x = 16'sd0;   #1; checks++; if (mu9[ZE] != 256) failures++;
    x = 16'sd512; #1; checks++; if (mu9[PL] != 256) failures++;
    x = -16'sd512; #1; checks++; if (mu9[NL] != 256) failures++;
    x = 16'sd32767; #1; checks++; if (mu7[PL] != 256) failures++;
    x = -16'sd32768; #1; checks++; if (mu7[NL] != 256) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
