// Test bench for svpwm_pwm: loads random dwell times and sectors and watches
// one half period. Checks the clock count between ticks (HALF, so the
// switching period is 2*HALF), the on-time of each leg against the sum of
// the dwell times of the vectors in which that leg is on (vectors taken from
// the space-vector hexagon, written out here), that only V0, V7 and the two
// active vectors of the sector appear, and that at most one leg switches at a
// time.
module tb_svpwm_pwm;
  timeunit 1ns;
  timeprecision 1ps;
  import im_ctrl_pkg::*;
  localparam int HALF = 200;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, tick, up;
  logic [15:0] ta, tb, t0, cnt;
  logic [2:0] sector;
  sw_state_t leg;

  // V1..V6 as {c, b, a}
  logic [2:0] hexagon [1:6] = '{3'b001, 3'b011, 3'b010, 3'b110, 3'b100, 3'b101};

  svpwm_pwm #(.HALF(HALF)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_tick(output int gap);
    gap = 0;
    do begin
      @(negedge clk);
      gap++;
    end while (!tick);
  endtask

  task automatic run(input int a, input int b, input int sec);
    int gap, hi [3], expo, bad_state, multi;
    logic [2:0] va, vb, prev;
    va = hexagon[sec];
    vb = hexagon[sec == 6 ? 1 : sec + 1];
    @(negedge clk);
    ta = 16'(a); tb = 16'(b); t0 = 16'(HALF - a - b); sector = 3'(sec);
    wait_tick(gap);
    wait_tick(gap);
    checks++;
    if (gap != HALF) begin
      failures++;
      $display("FAIL ticks %0d clocks apart", gap);
    end
    // now in the first clock of a half period with the new values
    hi = '{0, 0, 0};
    bad_state = 0; multi = 0;
    prev = leg;
    for (int n = 0; n < HALF; n++) begin
      for (int x = 0; x < 3; x++) if (leg[x]) hi[x]++;
      if (!(leg == 3'b000 || leg == 3'b111 || leg == va || leg == vb)) bad_state++;
      // with a dwell time of zero a vector is skipped and two legs may switch together
      if ($countones(leg ^ prev) > 1 && a > 0 && b > 0 && (HALF - a - b) >= 2) multi++;
      prev = leg;
      @(negedge clk);
    end
    for (int x = 0; x < 3; x++) begin
      expo = (HALF - a - b) / 2 + (va[x] ? a : 0) + (vb[x] ? b : 0);
      checks++;
      if (hi[x] < expo - 1 || hi[x] > expo + 1) begin
        failures++;
        $display("FAIL sector %0d ta=%0d tb=%0d leg %0d on %0d expected %0d", sec, a, b, x, hi[x], expo);
      end
    end
    checks++;
    if (bad_state != 0 || multi != 0) begin
      failures++;
      $display("FAIL sector %0d: %0d foreign states, %0d multi-leg switchings", sec, bad_state, multi);
    end
  endtask

  initial begin
    int a, b;
    ta = 0; tb = 0; t0 = HALF; sector = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int s = 1; s <= 6; s++) run(60, 40, s);
    run(0, 0, 3);
    run(HALF, 0, 4);
    for (int n = 0; n < 100; n++) begin
      a = $urandom_range(HALF);
      b = $urandom_range(HALF - a);
      run(a, b, $urandom_range(6, 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
