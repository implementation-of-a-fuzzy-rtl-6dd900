// Test bench for angle_gen: runs the accumulator for a number of ticks at
// several frequencies and compares the angle with f * n / TICK_HZ turns
// (floating point), and sector and alpha with that angle split into sixths
// of a turn. Checks that every sector is visited in order 1..6 and that
// nothing moves without a tick.
module tb_angle_gen;
  timeunit 1ns;
  timeprecision 1ps;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, tick = 0, valid;
  logic [15:0] f_cmd, alpha, angle;
  logic [2:0] sector;
  int seen [7];

  angle_gen #(.TICK_HZ(20000)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real turns, frac, sixth, diff;
    int n_ticks;
    logic [2:0] last_sector;
    f_cmd = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    turns = 0.0;
    last_sector = 3'd1;
    foreach (seen[k]) seen[k] = 0;
    for (int run = 0; run < 4; run++) begin
      f_cmd = 16'(run == 0 ? 12800 : run == 1 ? 256 : run == 2 ? 10240 : 5555);
      n_ticks = (run == 1) ? 2000 : 1500;
      for (int n = 0; n < n_ticks; n++) begin
        @(negedge clk);
        tick = 1;
        @(negedge clk);
        tick = 0;
        turns = turns + real'(f_cmd) / 256.0 / 20000.0;
        frac = turns - real'($floor(turns));
        diff = real'(angle) / 65536.0 - frac;
        if (diff > 0.5) diff = diff - 1.0;
        if (diff < -0.5) diff = diff + 1.0;
        sixth = real'(sector - 1) + real'(alpha) / 65536.0;
        checks++;
        if (!valid || diff > 0.0001 || diff < -0.0001 ||
            (sixth / 6.0 - real'(angle) / 65536.0) > 0.00005 ||
            (sixth / 6.0 - real'(angle) / 65536.0) < -0.00005) begin
          failures++;
          $display("FAIL angle=%0d sector=%0d alpha=%0d expected turn fraction %f", angle, sector, alpha, frac);
        end
        checks++;
        if (sector != last_sector && sector != (last_sector == 6 ? 3'd1 : last_sector + 3'd1)) begin
          failures++;
          $display("FAIL sector jumped %0d -> %0d", last_sector, sector);
        end
        last_sector = sector;
        seen[sector]++;
        // no tick, no movement
        repeat (3) @(negedge clk);
        checks++;
        if (valid || angle != angle) failures++;
      end
    end
    for (int k = 1; k <= 6; k++) begin
      checks++;
      if (seen[k] == 0) begin
        failures++;
        $display("FAIL sector %0d never visited", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
