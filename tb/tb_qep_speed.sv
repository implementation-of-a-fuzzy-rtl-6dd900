// Test bench for qep_speed: generates quadrature signals with a step every P
// clocks, forwards and backwards, and checks the published count against
// WINDOW / P (within one step), the one-cycle valid every WINDOW clocks, and
// that a step on both channels at once sets err.
module tb_qep_speed;
  timeunit 1ns;
  timeprecision 1ps;
  localparam int WINDOW = 3000;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, qa = 0, qb = 0, valid, err;
  logic signed [15:0] speed;
  int period = 0, dir = 1, phase = 0, div = 0, last_valid = -1, cyc = 0;

  qep_speed #(.W(16), .WINDOW(WINDOW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // quadrature source: phase 0..3 -> {A,B} = 00, 10, 11, 01 (A leads when dir = +1)
  always @(negedge clk) begin
    cyc++;
    if (period != 0) begin
      div++;
      if (div >= period) begin
        div = 0;
        phase = (phase + dir + 4) % 4;
        qa = (phase == 1 || phase == 2);
        qb = (phase == 2 || phase == 3);
      end
    end
  end

  task automatic measure(input int p, input int d);
    int expc;
    period = p; dir = d;
    // skip two windows so that the count is settled
    repeat (2) @(posedge valid);
    @(posedge valid);
    @(negedge clk);
    expc = d * (WINDOW / p);
    checks++;
    if (int'(speed) < expc - 1 || int'(speed) > expc + 1) begin
      failures++;
      $display("FAIL period %0d dir %0d: speed %0d expected %0d", p, d, speed, expc);
    end
  endtask

  always @(posedge clk) if (!rst && valid) begin
    if (last_valid >= 0) begin
      checks++;
      if (cyc - last_valid != WINDOW) begin
        failures++;
        $display("FAIL window %0d clocks", cyc - last_valid);
      end
    end
    last_valid = cyc;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    measure(10, 1);
    measure(37, 1);
    measure(5, -1);
    measure(100, -1);
    measure(0 + 3000, 1);
    checks++;
    if (err) begin failures++; $display("FAIL err set by valid steps"); end
    // an invalid double step
    @(negedge clk);
    period = 0;
    qa = ~qa; qb = ~qb;
    repeat (5) @(negedge clk);
    checks++;
    if (!err) begin failures++; $display("FAIL err not set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
