// Test bench for svpwm_times: random modulation index, sector and angle;
// compares Ta, Tb with sqrt(3)/pi * m * sin(60 deg - alpha) * HALF and
// sqrt(3)/pi * m * sin(alpha) * HALF computed with $sin, checks
// T0 = HALF - Ta - Tb exactly, the sector passed through and the 3-cycle
// latency. Includes the operating point m = 0.907 at 30 degrees, where the
// zero vectors take half the period.
module tb_svpwm_times;
  timeunit 1ns;
  timeprecision 1ps;
  localparam int HALF = 2500;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, valid_in = 0, valid_out;
  logic [15:0] m, alpha, ta, tb, t0;
  logic [2:0] sector, sector_out;

  svpwm_times #(.HALF(HALF)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam real PI = 3.14159265358979;

  task automatic run(input int mv, input int sec, input int al);
    real a_rad, eta, etb, mm;
    int lat;
    @(negedge clk);
    m = 16'(mv); sector = 3'(sec); alpha = 16'(al); valid_in = 1;
    @(negedge clk);
    valid_in = 0;
    m = 16'($urandom); alpha = 16'($urandom); sector = 3'($urandom);
    lat = 1;
    while (!valid_out && lat < 10) begin
      @(negedge clk);
      lat++;
    end
    // alpha is used to 8 bits
    a_rad = real'(al / 256) / 256.0 * PI / 3.0;
    mm = real'(mv) / 65536.0;
    eta = $sqrt(3.0) / PI * mm * $sin(PI / 3.0 - a_rad) * HALF;
    etb = $sqrt(3.0) / PI * mm * $sin(a_rad) * HALF;
    checks++;
    if (lat != 3 || sector_out != 3'(sec) ||
        real'(ta) > eta + 2.0 || real'(ta) < eta - 2.0 ||
        real'(tb) > etb + 2.0 || real'(tb) < etb - 2.0 ||
        int'(t0) != HALF - int'(ta) - int'(tb)) begin
      failures++;
      $display("FAIL m=%0d sec=%0d al=%0d: ta=%0d tb=%0d t0=%0d lat=%0d expected %f %f",
               mv, sec, al, ta, tb, t0, lat, eta, etb);
    end
  endtask

  initial begin
    m = 0; alpha = 0; sector = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    // m = 0.907, alpha = 30 deg: T0 = 0.5 of the half period
    run(59441, 1, 32768);
    checks++;
    if (t0 < 16'(HALF / 2 - 3) || t0 > 16'(HALF / 2 + 3)) begin
      failures++;
      $display("FAIL T0 at m=0.907, 30 deg is %0d", t0);
    end
    run(0, 3, 1000);
    run(65535, 6, 0);
    run(65535, 2, 65535);
    for (int n = 0; n < 500; n++)
      run($urandom_range(65535), $urandom_range(6, 1), $urandom_range(65535));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
