// Fuzzy PI speed controller.
//
// For every new speed sample the error stage forms e = ref - actual and
// ce = e - previous e. Two fuzzifiers map e onto the labels of the universe
// [-1, 1] (edge at 2**E_LOG2 rpm) and ce onto the labels of [-3, 3] (edge at
// 2**CE_LOG2 rpm per sample). The rule engine evaluates all 49 rules and
// defuzzifies to u on the output universe [0.5, 1.0]. Its centre label z
// (u = 0.75) means "hold": the controller is of PI type because the crisp
// output is used as an increment, f_cmd += KU * (u_pos - 768) / 256, with the
// accumulated stator frequency command held between F_MIN and F_MAX.
//
// Interface: sample pulses with a new speed_act; update pulses when f_cmd has
// been updated, 52 cycles later. f_cmd is unsigned Q8.8 Hz (256 = 1 Hz).
// at_max / at_min flag that the last update was clipped.
//
// The error and change-of-error inputs, the seven-label universes and the rule
// base follow the controller's description; the incremental (integrating) use
// of the fuzzy output, the scaling of e and ce, the gain KU and the frequency
// limits are this design's choices.
module fuzzy_pi_ctrl
  import im_ctrl_pkg::*;
#(
  parameter int W       = 16,
  parameter int E_LOG2  = 9,          // 512 rpm of error = 1.0
  parameter int CE_LOG2 = 7,          // 128 rpm per sample = 3.0
  parameter int KU      = 64,         // integrator gain, 1/256 units
  parameter int F_MIN   = 0,          // Q8.8 Hz
  parameter int F_MAX   = 12800,      // 50 Hz
  parameter int F_INIT  = 0
) (
  input  logic                clk,
  input  logic                rst,      // synchronous, active high
  input  logic                sample,
  input  logic signed [W-1:0] speed_ref,
  input  logic signed [W-1:0] speed_act,
  output logic [15:0]         f_cmd,
  output logic                update,
  output logic [10:0]         u_pos,    // last defuzzified output, 768 = z
  output logic signed [W-1:0] e,
  output logic signed [W-1:0] ce,
  output logic                at_max,
  output logic                at_min
);

  logic    err_valid, eng_done, eng_busy;
  mu_vec_t mu_e, mu_ce;

  speed_error #(.W(W)) u_err (
    .clk, .rst, .sample, .speed_ref, .speed_act,
    .e, .ce, .valid(err_valid)
  );

  fuzzifier #(.IN_W(W), .HALF_LOG2(E_LOG2))  u_fz_e  (.x(e),  .mu(mu_e));
  fuzzifier #(.IN_W(W), .HALF_LOG2(CE_LOG2)) u_fz_ce (.x(ce), .mu(mu_ce));

  fuzzy_rule_engine u_eng (
    .clk, .rst, .start(err_valid), .mu_e, .mu_ce,
    .busy(eng_busy), .done(eng_done), .u_pos
  );

  // Integrator: increment in Q8.8 Hz.
  logic signed [12:0] du;
  logic signed [31:0] step;
  logic signed [31:0] f_next;

  always_comb begin
    du     = 13'(u_pos) - 13'sd768;
    step   = (32'(du) * 32'(KU)) >>> 8;
    f_next = 32'(f_cmd) + step;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      f_cmd  <= 16'(F_INIT);
      update <= 1'b0;
      at_max <= 1'b0;
      at_min <= 1'b0;
    end else begin
      update <= eng_done;
      if (eng_done) begin
        at_max <= (f_next > 32'(F_MAX));
        at_min <= (f_next < 32'(F_MIN));
        if (f_next > 32'(F_MAX))      f_cmd <= 16'(F_MAX);
        else if (f_next < 32'(F_MIN)) f_cmd <= 16'(F_MIN);
        else                          f_cmd <= f_next[15:0];
      end
    end
  end

  // A new sample must not arrive while the rule engine is still working.
  a_no_overrun: assert property (@(posedge clk) disable iff (rst)
    err_valid |-> !eng_busy);

endmodule
