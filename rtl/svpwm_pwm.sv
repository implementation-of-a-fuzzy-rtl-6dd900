// Symmetric space-vector PWM generator.
//
// A triangular carrier counts 0 .. HALF-1 and back down, so one switching
// period is 2*HALF clocks (10 kHz at 50 MHz with HALF = 2500). At each end of
// the triangle (tick) the compare registers are loaded from ta, tb, t0 and
// sector, so the reference is sampled twice per period. For sector k with
// active vectors Va = Vk and Vb = Vk+1, the upper switch of leg x conducts for
//   on_x = T0/2 + (x set in Va ? Ta : 0) + (x set in Vb ? Tb : 0)
// counts of each half period, centred on the carrier valley. Every half period
// therefore runs V0 (T0/4 of the period) - the two active vectors (Ta/2 and
// Tb/2) - V7 (T0/4) and mirrors it, the zero vectors split equally between V0
// and V7, with one leg switching at each step.
//
// Interface: ta, tb, t0 in counts of a half period, taken at tick; leg is the
// switching state {c, b, a} (1 = upper switch on); cnt/up expose the carrier.
// tick is a one-cycle pulse at the clock on which new values are loaded;
// values present on that clock are applied to the half period that starts
// next.
//
// The switching states of the hexagon, the sequence and the 10 kHz switching
// frequency follow the modulator's description; the carrier comparison that
// realises the sequence is this design's choice.
module svpwm_pwm
  import im_ctrl_pkg::*;
#(
  parameter int HALF = 2500
) (
  input  logic        clk,
  input  logic        rst,            // synchronous, active high
  input  logic [15:0] ta,
  input  logic [15:0] tb,
  input  logic [15:0] t0,
  input  logic [2:0]  sector,         // 1..6
  output logic        tick,
  output sw_state_t   leg,
  output logic [15:0] cnt,
  output logic        up
);

  logic [15:0] on_q [3];
  logic [17:0] on_n [3];
  sw_state_t   va, vb;
  logic [2:0]  sec_b;
  logic        boundary;

  always_comb begin
    sec_b = (sector == 3'd6) ? 3'd1 : sector + 3'd1;
    va    = active_vector(sector);
    vb    = active_vector(sec_b);
    for (int x = 0; x < 3; x++) begin
      on_n[x] = 18'(t0 >> 1)
              + (va[x] ? 18'(ta) : 18'd0)
              + (vb[x] ? 18'(tb) : 18'd0);
    end
    boundary = up ? (cnt == 16'(HALF - 1)) : (cnt == 16'd0);
    for (int x = 0; x < 3; x++) leg[x] = (cnt < on_q[x]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt  <= '0;
      up   <= 1'b1;
      tick <= 1'b0;
      for (int x = 0; x < 3; x++) on_q[x] <= '0;
    end else begin
      tick <= boundary;
      if (boundary) begin
        up <= ~up;                    // the end count is held for one clock
        for (int x = 0; x < 3; x++)
          on_q[x] <= (on_n[x] > 18'(HALF)) ? 16'(HALF) : on_n[x][15:0];
      end else if (up) begin
        cnt <= cnt + 1'b1;
      end else begin
        cnt <= cnt - 1'b1;
      end
    end
  end

endmodule
