// Test bench for speed_error: random reference and actual speeds, checks
// e = ref - act and ce = e - previous e after each sample, the one-cycle
// valid, that values hold between samples, and saturation at 16 bits.
module tb_speed_error;
  timeunit 1ns;
  timeprecision 1ps;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, sample = 0, valid;
  logic signed [15:0] speed_ref, speed_act, e, ce;
  int prev_e;

  speed_error #(.W(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sat16(input int v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  task automatic step(input int r, input int a);
    int exp_e, exp_ce;
    @(negedge clk);
    speed_ref = 16'(r); speed_act = 16'(a); sample = 1;
    @(negedge clk);
    sample = 0;
    exp_e  = sat16(r - a);
    exp_ce = sat16(exp_e - prev_e);
    checks++;
    if (!valid || e != 16'(exp_e) || ce != 16'(exp_ce)) begin
      failures++;
      $display("FAIL r=%0d a=%0d: e=%0d ce=%0d valid=%0b expected %0d %0d", r, a, e, ce, valid, exp_e, exp_ce);
    end
    prev_e = exp_e;
    speed_ref = 16'($urandom); speed_act = 16'($urandom);
    @(negedge clk);
    checks++;
    if (valid || e != 16'(exp_e)) begin
      failures++;
      $display("FAIL value not held");
    end
  endtask

  initial begin
    speed_ref = 0; speed_act = 0; prev_e = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    step(1000, 0);
    step(1000, 400);
    step(1000, 1100);
    step(32000, -32000);        // saturates e
    step(-32000, 32000);        // saturates ce
    for (int n = 0; n < 300; n++)
      step($signed(16'($urandom)) / 2, $signed(16'($urandom)) / 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
