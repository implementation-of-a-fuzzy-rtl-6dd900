// Constant V/F profile.
//
// Keeps the ratio of stator voltage to stator frequency constant by making the
// SVPWM modulation index proportional to the frequency command:
// m = M_RATED * f / F_RATED, held at M_RATED above the rated frequency (the
// inverter cannot raise the voltage further). The modulation index at rated
// frequency is 0.907 (59441 / 65536).
//
// Interface: f_cmd unsigned Q8.8 Hz in; m unsigned Q0.16 out; limited is high
// while m is held at the limit. Registered, one clock of latency.
//
// Constant V/F and the index 0.907 follow the drive's description; the linear
// law through zero (no low-speed voltage boost) and the rated frequency of
// 50 Hz are this design's choices.
module vf_profile #(
  parameter int M_RATED = 59441,      // Q0.16, 0.907
  parameter int F_RATED = 12800       // Q8.8 Hz, 50 Hz
) (
  input  logic        clk,
  input  logic        rst,            // synchronous, active high
  input  logic [15:0] f_cmd,
  output logic [15:0] m,
  output logic        limited
);

  // m = f * SLOPE / 2**16, SLOPE = M_RATED * 2**16 / F_RATED
  localparam longint SLOPE = (longint'(M_RATED) <<< 16) / longint'(F_RATED);

  logic [47:0] prod;
  logic [31:0] m_raw;

  always_comb begin
    prod  = 48'(f_cmd) * 48'(SLOPE);
    m_raw = 32'(prod >> 16);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      m       <= '0;
      limited <= 1'b0;
    end else if (m_raw >= 32'(M_RATED) || 32'(f_cmd) >= 32'(F_RATED)) begin
      m       <= 16'(M_RATED);
      limited <= 1'b1;
    end else begin
      m       <= m_raw[15:0];
      limited <= 1'b0;
    end
  end

endmodule
