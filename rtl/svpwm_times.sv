// SVPWM dwell-time calculator.
//
// From the modulation index m and the angle alpha of the reference inside its
// sector it computes, in clock counts of one half switching period (HALF
// counts = Ts/2, the sampling interval of the modulator):
//   Ta = K * m * sin(60 deg - alpha) * HALF   (first active vector Vk)
//   Tb = K * m * sin(alpha)          * HALF   (second active vector Vk+1)
//   T0 = HALF - Ta - Tb                       (zero vectors V0 and V7)
// with K = sqrt(3)/pi. These are the generic per-sector dwell-time equations
// written with the angle measured from the sector's first vector. T0 is held
// at zero should Ta + Tb exceed HALF.
//
// The sine of 0..60 degrees comes from a 257-entry ROM, entry i holding
// round(32768 * sin(i * 60 deg / 256)), filled at elaboration; alpha is used
// to 8 bits (0.23 degree steps).
//
// Interface: valid_in samples m, sector, alpha; three clocks later valid_out
// pulses with ta, tb, t0 and the matching sector. Outputs hold until the next
// result.
//
// The equations and K follow the modulator's description; the ROM, its
// resolution and the pipelining are this design's choices.
module svpwm_times #(
  parameter int HALF  = 2500,         // clocks per half switching period
  parameter int K_Q16 = 36132         // sqrt(3)/pi in Q0.16
) (
  input  logic        clk,
  input  logic        rst,            // synchronous, active high
  input  logic        valid_in,
  input  logic [15:0] m,              // Q0.16
  input  logic [2:0]  sector,         // 1..6
  input  logic [15:0] alpha,          // 2**16 = 60 deg
  output logic        valid_out,
  output logic [2:0]  sector_out,
  output logic [15:0] ta,
  output logic [15:0] tb,
  output logic [15:0] t0
);

  localparam longint KH = longint'(K_Q16) * longint'(HALF);   // K*HALF, Q16

  function automatic logic [15:0] sin60_q15(input int k);
    real x, term, s;
    x    = 3.14159265358979 / 3.0 * real'(k) / 256.0;
    term = x;
    s    = x;
    for (int n = 1; n < 8; n++) begin
      term = -term * x * x / real'((2*n) * (2*n + 1));
      s    = s + term;
    end
    return 16'($rtoi(s * 32768.0 + 0.5));
  endfunction

  logic [15:0] sin_rom [257];
  initial for (int k = 0; k <= 256; k++) sin_rom[k] = sin60_q15(k);

  // stage 1: table look-up
  logic        v1, v2;
  logic [2:0]  sec1, sec2;
  logic [15:0] m1, sa1, sb1;
  // stage 2: m * sin, Q0.16
  logic [16:0] pa2, pb2;
  logic [31:0] ma_full, mb_full;
  logic [63:0] ta_full, tb_full;
  logic [16:0] ta_c, tb_c;

  always_comb begin
    ma_full = 32'(m1) * 32'(sa1);
    mb_full = 32'(m1) * 32'(sb1);
    ta_full = 64'(pa2) * 64'(KH);
    tb_full = 64'(pb2) * 64'(KH);
    ta_c    = 17'(ta_full >> 32);
    tb_c    = 17'(tb_full >> 32);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      v1 <= 1'b0; v2 <= 1'b0; valid_out <= 1'b0;
      sec1 <= 3'd1; sec2 <= 3'd1; sector_out <= 3'd1;
      m1 <= '0; sa1 <= '0; sb1 <= '0;
      pa2 <= '0; pb2 <= '0;
      ta <= '0; tb <= '0; t0 <= 16'(HALF);
    end else begin
      v1 <= valid_in;
      v2 <= v1;
      valid_out <= v2;
      if (valid_in) begin
        sec1 <= sector;
        m1   <= m;
        sa1  <= sin_rom[9'd256 - 9'(alpha[15:8])];
        sb1  <= sin_rom[9'(alpha[15:8])];
      end
      if (v1) begin
        sec2 <= sec1;
        pa2  <= 17'(ma_full >> 15);
        pb2  <= 17'(mb_full >> 15);
      end
      if (v2) begin
        sector_out <= sec2;
        ta <= ta_c[15:0];
        tb <= tb_c[15:0];
        if (32'(ta_c) + 32'(tb_c) >= 32'(HALF)) t0 <= '0;
        else t0 <= 16'(32'(HALF) - 32'(ta_c) - 32'(tb_c));
      end
    end
  end

endmodule
