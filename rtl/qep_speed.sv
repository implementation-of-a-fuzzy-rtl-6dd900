// Quadrature-encoder speed measurement.
//
// The encoder channels A and B are synchronised with two flip-flops each and
// decoded four-fold: every valid edge of either channel counts one step, up
// when A leads B and down when B leads A. A step on both channels at once is
// invalid; it sets err and is not counted. The steps are counted over a fixed
// window of WINDOW clocks; at its end the count is published as speed and
// valid pulses. With a 1000-line encoder (4000 steps per revolution) and a
// window of 15 ms (750000 clocks at 50 MHz) the count equals the speed in rpm.
//
// Interface: qa, qb asynchronous encoder inputs; speed signed, W bits,
// saturated; valid one-cycle pulse per window; err sticky until reset.
//
// Speed feedback from a quadrature encoder as a digital pulse train follows
// the drive's description; the decoding, window method, encoder resolution
// and window length are this design's choices.
module qep_speed #(
  parameter int W      = 16,
  parameter int WINDOW = 750000
) (
  input  logic                clk,
  input  logic                rst,      // synchronous, active high
  input  logic                qa,
  input  logic                qb,
  output logic signed [W-1:0] speed,
  output logic                valid,
  output logic                err
);

  localparam int TW = $clog2(WINDOW);
  localparam logic signed [W-1:0] SMAX = W'((1 << (W-1)) - 1);
  localparam logic signed [W-1:0] SMIN = -W'((1 << (W-1)) - 1);

  logic [1:0] sa, sb;                  // synchronisers
  logic [1:0] prev;                    // last decoded {A, B}
  logic [1:0] cur;
  logic signed [W-1:0] count;
  logic [TW-1:0] timer;
  logic          step_up, step_dn, step_bad;

  always_comb begin
    cur      = {sa[1], sb[1]};
    step_up  = 1'b0;
    step_dn  = 1'b0;
    step_bad = 1'b0;
    // Gray sequence with A leading: 00 -> 10 -> 11 -> 01 -> 00
    unique case ({prev, cur})
      4'b00_10, 4'b10_11, 4'b11_01, 4'b01_00: step_up  = 1'b1;
      4'b00_01, 4'b01_11, 4'b11_10, 4'b10_00: step_dn  = 1'b1;
      4'b00_11, 4'b11_00, 4'b01_10, 4'b10_01: step_bad = 1'b1;
      default: ;                        // no change
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sa    <= '0;
      sb    <= '0;
      prev  <= '0;
      count <= '0;
      timer <= '0;
      speed <= '0;
      valid <= 1'b0;
      err   <= 1'b0;
    end else begin
      sa   <= {sa[0], qa};
      sb   <= {sb[0], qb};
      prev <= cur;
      if (step_bad) err <= 1'b1;
      valid <= 1'b0;
      if (timer == TW'(WINDOW - 1)) begin
        timer <= '0;
        valid <= 1'b1;
        speed <= count + (step_up && count != SMAX ? W'(1) : W'(0))
                       - (step_dn && count != SMIN ? W'(1) : W'(0));
        count <= '0;
      end else begin
        timer <= timer + 1'b1;
        if (step_up && count != SMAX) count <= count + 1'b1;
        if (step_dn && count != SMIN) count <= count - 1'b1;
      end
    end
  end

endmodule
