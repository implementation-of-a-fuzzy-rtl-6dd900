// Test bench for dead_band: drives a random leg reference with both long and
// short pulses and compares both gates every clock with the rule "a gate is
// on only when the reference has asked for it on each of the last DEAD+2
// clock edges". Also checks that the two gates are never on together and that
// a dead interval actually occurs.
module tb_dead_band;
  timeunit 1ns;
  timeprecision 1ps;
  localparam int DEAD = 7;
  int checks = 0, failures = 0, dead_gaps = 0;
  logic clk = 0, rst = 1, ref_in = 0, gate_hi, gate_lo;
  logic [DEAD+1:0] hist;        // reference sampled at the last DEAD+2 edges

  dead_band #(.DEAD(DEAD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) hist <= {hist[DEAD:0], ref_in};

  initial begin
    int run_len = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (DEAD + 4) @(negedge clk);
    for (int n = 0; n < 20000; n++) begin
      if (run_len <= 0) begin
        ref_in = ~ref_in;
        run_len = ($urandom_range(3) == 0) ? $urandom_range(DEAD) : $urandom_range(60, 1);
      end
      run_len--;
      @(negedge clk);
      checks++;
      if (gate_hi != (&hist) || gate_lo != (~|hist) || (gate_hi && gate_lo)) begin
        failures++;
        $display("FAIL at %0t: hi=%0b lo=%0b history=%b", $time, gate_hi, gate_lo, hist);
      end
      if (!gate_hi && !gate_lo) dead_gaps++;
    end
    checks++;
    if (dead_gaps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
