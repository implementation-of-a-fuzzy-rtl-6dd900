// Reference-vector angle generator.
//
// A 32-bit phase accumulator (2**32 = one electrical revolution) advances by
// f_cmd / TICK_HZ of a turn at every tick, the sampling instant of the
// modulator (twice per switching period). The angle is split into the hexagon
// sector k = 1..6 (sector k lies between active vectors Vk and Vk+1, V1 on the
// alpha axis) and the angle inside the sector, alpha, as a 16-bit fraction of
// 60 degrees. The reference turns anticlockwise.
//
// Interface: f_cmd unsigned Q8.8 Hz; tick one-cycle pulse; sector, alpha and
// the full angle (upper 16 bits of the accumulator) are registered and change
// one clock after the tick, when valid pulses.
//
// Sector numbering and rotation follow the space-vector hexagon; the
// accumulator width and the sampling at every tick are this design's choices.
module angle_gen #(
  parameter int TICK_HZ = 20000       // two samples per 10 kHz period
) (
  input  logic        clk,
  input  logic        rst,            // synchronous, active high
  input  logic [15:0] f_cmd,
  input  logic        tick,
  output logic [2:0]  sector,         // 1..6
  output logic [15:0] alpha,          // angle inside the sector, 2**16 = 60 deg
  output logic [15:0] angle,          // 2**16 = 360 deg
  output logic        valid
);

  // increment per tick = f_q8 * 2**24 / TICK_HZ = f_q8 * PHASE_K / 2**16
  localparam longint PHASE_K = (longint'(1) <<< 40) / longint'(TICK_HZ);

  logic [31:0] acc, acc_next;
  logic [47:0] inc;
  logic [18:0] sixths;

  always_comb begin
    inc      = 48'(f_cmd) * 48'(PHASE_K);
    acc_next = acc + inc[47:16];
    sixths   = 19'(acc_next[31:16]) * 19'd6;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc    <= '0;
      sector <= 3'd1;
      alpha  <= '0;
      angle  <= '0;
      valid  <= 1'b0;
    end else begin
      valid <= tick;
      if (tick) begin
        acc    <= acc_next;
        angle  <= acc_next[31:16];
        sector <= sixths[18:16] + 3'd1;
        alpha  <= sixths[15:0];
      end
    end
  end

endmodule
