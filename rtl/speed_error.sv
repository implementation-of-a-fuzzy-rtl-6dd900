// Speed error stage of the fuzzy PI controller.
//
// Each time a new speed measurement arrives (sample pulse) it forms the speed
// error e = reference speed - actual speed and the change in error
// ce = e - previous e, and remembers e for the next sample. Both are held until
// the next sample; valid pulses for one cycle when they change. After reset
// the previous error is zero.
//
// Interface: speeds in signed W-bit words (rpm with the default encoder
// scaling); e and ce are saturated to W bits. Latency: one clock.
//
// The two formulas are the controller's own; the saturation and the reset
// value of the previous error are this design's choices.
module speed_error #(
  parameter int W = 16
) (
  input  logic                clk,
  input  logic                rst,        // synchronous, active high
  input  logic                sample,
  input  logic signed [W-1:0] speed_ref,
  input  logic signed [W-1:0] speed_act,
  output logic signed [W-1:0] e,
  output logic signed [W-1:0] ce,
  output logic                valid
);

  localparam logic signed [W+1:0] MAXV = (W+2)'((1 << (W-1)) - 1);
  localparam logic signed [W+1:0] MINV = -(W+2)'(1 << (W-1));

  function automatic logic signed [W-1:0] sat(input logic signed [W+1:0] v);
    if (v > MAXV) return MAXV[W-1:0];
    if (v < MINV) return MINV[W-1:0];
    return v[W-1:0];
  endfunction

  logic signed [W-1:0] e_prev;
  logic signed [W-1:0] e_new;

  always_comb e_new = sat((W+2)'(speed_ref) - (W+2)'(speed_act));

  always_ff @(posedge clk) begin
    if (rst) begin
      e      <= '0;
      ce     <= '0;
      e_prev <= '0;
      valid  <= 1'b0;
    end else begin
      valid <= sample;
      if (sample) begin
        e      <= e_new;
        ce     <= sat((W+2)'(e_new) - (W+2)'(e_prev));
        e_prev <= e_new;
      end
    end
  end

endmodule
