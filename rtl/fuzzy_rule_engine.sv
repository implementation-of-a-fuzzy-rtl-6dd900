// Fuzzy rule engine: inference over the 7x7 rule base and defuzzification.
//
// On start it walks all 49 input combinations (error label i, change-of-error
// label j), one per clock. For each it forms the rule strength as the product
// of the two memberships and adds strength times the position of the rule's
// output label to an accumulator. Because each fuzzifier's memberships sum to
// 1.0, the strengths of all 49 rules sum to exactly 1.0 (65536), so the
// weighted mean of the output label centres - the centre-of-gravity of the
// output singletons - needs no divider: it is the accumulator shifted right.
//
// Output: u_pos on the output label axis, 0..1536 (256 per label; nl = 0,
// z = 768, pl = 1536). On the output universe of the controller, 0.5..1.0,
// u = 0.5 + u_pos / 3072.
//
// Timing: start is a one-cycle pulse while mu_e/mu_ce are stable; they are
// sampled on that edge. done pulses 50 cycles later with u_pos valid and held.
// busy is high in between; a start while busy is ignored.
//
// The rule table and the seven labels are the controller's own. Product for
// AND, sum for the aggregation and the singleton centre-of-gravity are this
// design's choices.
module fuzzy_rule_engine
  import im_ctrl_pkg::*;
(
  input  logic    clk,
  input  logic    rst,          // synchronous, active high
  input  logic    start,
  input  mu_vec_t mu_e,         // memberships of the speed error
  input  mu_vec_t mu_ce,        // memberships of the change in error
  output logic    busy,
  output logic    done,
  output logic [10:0] u_pos
);

  // Rule base: output label for [change-of-error label][error label].
  localparam fuzzy_label_e RULES [N_LABELS][N_LABELS] = '{
    //      e: nl  nm  ns  z   ps  pm  pl
    /*nl*/ '{NL, NL, NL, NL, NM, NS, ZE},
    /*nm*/ '{NL, NL, NL, NM, NS, ZE, PS},
    /*ns*/ '{NL, NL, NM, NS, ZE, PS, PM},
    /*z */ '{NL, NM, NS, ZE, PS, PM, PL},
    /*ps*/ '{NM, NS, ZE, PS, PM, PL, PL},
    /*pm*/ '{NS, ZE, PS, PM, PL, PL, PL},
    /*pl*/ '{ZE, PS, PM, PL, PL, PL, PL}
  };

  mu_vec_t      mu_e_q, mu_ce_q;
  logic [2:0]   ie, ic;                 // rule being evaluated
  logic [16:0]  strength;               // mu_e * mu_ce, up to 65536
  logic [19:0]  acc;                    // sum of strength * label, up to 6*65536
  logic [17:0]  wsum;                   // sum of strengths, 65536 when complete
  logic [2:0]   out_lbl;

  always_comb begin
    strength = 17'(mu_e_q[ie]) * 17'(mu_ce_q[ic]);
    out_lbl  = RULES[ic][ie];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      ie    <= '0;
      ic    <= '0;
      acc   <= '0;
      wsum  <= '0;
      u_pos <= 11'(3 * MU_ONE);
      mu_e_q  <= '0;
      mu_ce_q <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy    <= 1'b1;
          mu_e_q  <= mu_e;
          mu_ce_q <= mu_ce;
          ie      <= '0;
          ic      <= '0;
          acc     <= '0;
          wsum    <= '0;
        end
      end else if (ic == 3'(N_LABELS)) begin
        // all 49 rules evaluated: centre of gravity of the output singletons
        busy  <= 1'b0;
        done  <= 1'b1;
        u_pos <= 11'(acc >> 8);
      end else begin
        acc  <= acc + 20'(strength) * 20'(out_lbl);
        wsum <= wsum + 18'(strength);
        if (ie == 3'(N_LABELS - 1)) begin
          ie <= '0;
          ic <= ic + 1'b1;
        end else begin
          ie <= ie + 1'b1;
        end
      end
    end
  end

  // Complete fuzzy partitions: the rule strengths add up to exactly 1.0.
  a_strength_sum: assert property (@(posedge clk) disable iff (rst)
    (busy && ic == 3'(N_LABELS)) |-> (wsum == 18'(MU_ONE * MU_ONE)));

endmodule
