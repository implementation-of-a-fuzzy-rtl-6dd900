// Test bench for vf_profile: for frequency commands from 0 to beyond rated,
// the modulation index must equal 0.907 * f / 50 Hz (floating-point
// reference, within one LSB of Q0.16) and be held at 0.907 with limited set
// at and above 50 Hz. Latency one clock.
module tb_vf_profile;
  timeunit 1ns;
  timeprecision 1ps;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, limited;
  logic [15:0] f_cmd, m;

  vf_profile dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_f(input int f);
    real expm;
    logic exp_lim;
    @(negedge clk);
    f_cmd = 16'(f);
    @(negedge clk);
    expm = 0.907 * 65536.0 * (real'(f) / 256.0) / 50.0;
    exp_lim = (expm >= 59441.0 - 1.0) && (f >= 12800);
    if (expm > 59441.0) expm = 59441.0;
    checks++;
    if (real'(m) > expm + 1.5 || real'(m) < expm - 1.5 || (f >= 12800 && !limited) || (f < 12700 && limited)) begin
      failures++;
      $display("FAIL f=%0d m=%0d limited=%0b expected %f %0b", f, m, limited, expm, exp_lim);
    end
  endtask

  initial begin
    f_cmd = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int f = 0; f <= 16000; f += 37) check_f(f);
    check_f(12800);
    check_f(65535);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
