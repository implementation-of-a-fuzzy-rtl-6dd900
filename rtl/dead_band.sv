// Dead-band generator for one inverter leg.
//
// The two switches of a leg are driven complementary, but never together:
// when the leg reference changes, the conducting switch is turned off at once
// and the other is turned on only after DEAD clocks during which both are
// off. A reference pulse shorter than DEAD clocks is swallowed (both switches
// stay off until the reference has been steady for DEAD clocks).
//
// Interface: ref_in 1 = upper switch should conduct. gate_hi / gate_lo drive
// the upper and lower switch, registered (one clock of latency plus the dead
// band on turn-on). After reset both are off for DEAD clocks.
//
// The complementary drive with a small dead band follows the inverter's
// description; its length (1 us at 50 MHz) is this design's choice.
module dead_band #(
  parameter int DEAD = 50
) (
  input  logic clk,
  input  logic rst,                   // synchronous, active high
  input  logic ref_in,
  output logic gate_hi,
  output logic gate_lo
);

  localparam int CW = $clog2(DEAD + 1);

  logic          state;
  logic [CW-1:0] wait_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= 1'b0;
      wait_cnt <= CW'(DEAD);
      gate_hi  <= 1'b0;
      gate_lo  <= 1'b0;
    end else if (ref_in != state) begin
      state    <= ref_in;
      wait_cnt <= CW'(DEAD);
      gate_hi  <= 1'b0;
      gate_lo  <= 1'b0;
    end else if (wait_cnt != '0) begin
      wait_cnt <= wait_cnt - 1'b1;
      gate_hi  <= 1'b0;
      gate_lo  <= 1'b0;
    end else begin
      gate_hi  <= state;
      gate_lo  <= ~state;
    end
  end

  a_never_both: assert property (@(posedge clk) !(gate_hi && gate_lo));

endmodule
