// Fuzzifier: one crisp input to the degrees of membership of seven labels.
//
// The labels nl, nm, ns, z, ps, pm, pl are triangles spread evenly over the
// input universe [-FS, +FS], where FS = 2**HALF_LOG2 input units stands for the
// end of the universe (1.0 for the speed error, 3.0 for the change of error).
// Neighbouring triangles cross at 0.5, so at most two labels are active and the
// memberships always sum to 1.0 (MU_ONE). Inputs outside the universe are held
// at its edge, where the outer label is fully true.
//
// Working: the clamped input is shifted to 0..2*FS and scaled to a position of
// 0..6*256 on the label axis; the upper bits pick the left label, the low eight
// bits are the membership of the right label, and 256 minus them that of the
// left one.
//
// Interface: x (signed, IN_W bits) in, mu (seven 9-bit memberships, 256 = 1.0)
// out. Purely combinational.
//
// Seven labels with triangular shapes over [-1,1], [-3,3] and [0.5,1] are the
// controller's own; the even spacing, the crossing at 0.5 and the scaling of
// the universe to a power of two of input units are choices of this design.
module fuzzifier
  import im_ctrl_pkg::*;
#(
  parameter int IN_W      = 16,
  parameter int HALF_LOG2 = 9      // universe edge at 2**HALF_LOG2 input units
) (
  input  logic signed [IN_W-1:0] x,
  output mu_vec_t                mu
);

  localparam int FS = 1 << HALF_LOG2;
  localparam int PW = HALF_LOG2 + 12;          // width of (x+FS)*3, with room to scale up

  logic signed [IN_W:0] xw;                     // sign-extended input
  logic signed [IN_W:0] xs;                     // clamped input
  logic [PW-1:0]        shifted;                // (xs + FS) * 3, 0..6*FS
  logic [10:0]          pos;                    // 0..1536 on the label axis
  logic [2:0]           idx;                    // left label, 0..5
  logic [8:0]           frac;                   // membership of right label

  initial begin
    assert (IN_W > HALF_LOG2) else $error("fuzzifier: IN_W too narrow");
  end

  always_comb begin
    xw = (IN_W+1)'(x);
    if (xw > (IN_W+1)'(FS))       xs = (IN_W+1)'(FS);
    else if (xw < -(IN_W+1)'(FS)) xs = -(IN_W+1)'(FS);
    else                          xs = xw;
    shifted = PW'(xs + (IN_W+1)'(FS)) * PW'(3);
    if (HALF_LOG2 >= 8) pos = 11'(shifted >> (HALF_LOG2 - 8));
    else                pos = 11'(shifted << (8 - HALF_LOG2));
    if (pos >= 11'(5 * MU_ONE)) begin
      idx  = 3'd5;
      frac = 9'(pos - 11'(5 * MU_ONE));
    end else begin
      idx  = pos[10:8];
      frac = {1'b0, pos[7:0]};
    end
    mu = '0;
    for (int j = 0; j < N_LABELS; j++) begin
      if (3'(j) == idx)          mu[j] = mu_t'(MU_ONE) - frac;
      else if (3'(j) == idx + 1) mu[j] = frac;
    end
  end

endmodule
