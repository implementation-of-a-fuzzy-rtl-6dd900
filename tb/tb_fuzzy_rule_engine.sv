// Test bench for fuzzy_rule_engine: feeds membership pairs shaped like the
// output of a fuzzifier (two neighbouring labels summing to 1.0, or one label
// fully true) and compares u_pos with a floating-point centre of gravity over
// the rule table written out here row by row. Also checks the 50-cycle
// latency and that a start while busy is ignored.
module tb_fuzzy_rule_engine;
  timeunit 1ns;
  timeprecision 1ps;
  import im_ctrl_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, start = 0;
  mu_vec_t mu_e, mu_ce;
  logic busy, done;
  logic [10:0] u_pos;

  // [ce][e], labels 0 = nl .. 6 = pl
  int table_ii [7][7] = '{
    '{0, 0, 0, 0, 1, 2, 3},
    '{0, 0, 0, 1, 2, 3, 4},
    '{0, 0, 1, 2, 3, 4, 5},
    '{0, 1, 2, 3, 4, 5, 6},
    '{1, 2, 3, 4, 5, 6, 6},
    '{2, 3, 4, 5, 6, 6, 6},
    '{3, 4, 5, 6, 6, 6, 6}
  };

  fuzzy_rule_engine dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic mu_vec_t make_mu(input int idx, input int frac);
    mu_vec_t m = '0;
    m[idx] = 9'(256 - frac);
    if (frac != 0) m[idx + 1] = 9'(frac);
    return m;
  endfunction

  task automatic run_case(input mu_vec_t me, input mu_vec_t mce);
    real num, den, expv;
    int lat;
    num = 0.0; den = 0.0;
    for (int i = 0; i < 7; i++)
      for (int j = 0; j < 7; j++) begin
        num += real'(me[i]) * real'(mce[j]) * real'(table_ii[j][i] * 256);
        den += real'(me[i]) * real'(mce[j]);
      end
    expv = num / den;
    @(negedge clk);
    mu_e = me; mu_ce = mce; start = 1;
    @(negedge clk);
    start = 0;
    mu_e = '0; mu_ce = '0;       // inputs must have been sampled
    lat = 0;
    // a second start while busy must be ignored
    start = 1;
    @(negedge clk);
    start = 0;
    lat++;
    while (!done) begin
      @(negedge clk);
      lat++;
    end
    checks++;
    if (real'(u_pos) > expv + 1.01 || real'(u_pos) < expv - 1.01) begin
      failures++;
      $display("FAIL u_pos=%0d expected %f", u_pos, expv);
    end
    checks++;
    if (lat != 50) begin
      failures++;
      $display("FAIL latency %0d", lat);
    end
    @(negedge clk);
    checks++;
    if (busy || done) begin
      failures++;
      $display("FAIL engine restarted by the start issued while busy");
    end
  endtask

  initial begin
    mu_e = '0; mu_ce = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    // every pure label pair reproduces the table
    for (int i = 0; i < 7; i++)
      for (int j = 0; j < 7; j++)
        run_case(make_mu(i, 0), make_mu(j, 0));
    // random partial memberships
    for (int n = 0; n < 200; n++)
      run_case(make_mu($urandom_range(5), $urandom_range(255)),
               make_mu($urandom_range(5), $urandom_range(255)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
