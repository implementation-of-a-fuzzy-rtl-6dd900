// Shared types and constants of the induction-motor speed controller.
//
// Fuzzy labels: seven linguistic terms nl, nm, ns, z, ps, pm, pl, used for the
// speed error, the change of error and the controller output. Memberships are
// unsigned fixed point with 1.0 = MU_ONE (256). A label position on the output
// universe is held in "steps": label j sits at j*MU_ONE, so the output universe
// spans 0..6*MU_ONE.
//
// Inverter: a switching state is the 3-bit word {c, b, a}; a 1 means the upper
// switch of that leg conducts. Active vector Vk of sector k follows the hexagon
// V1=001, V2=011, V3=010, V4=110, V5=100, V6=101, V0=000, V7=111.
package im_ctrl_pkg;

  typedef enum logic [2:0] {
    NL = 3'd0, NM = 3'd1, NS = 3'd2, ZE = 3'd3, PS = 3'd4, PM = 3'd5, PL = 3'd6
  } fuzzy_label_e;

  localparam int N_LABELS = 7;
  localparam int MU_W     = 9;               // membership width, 0..256
  localparam int MU_ONE   = 256;

  typedef logic [MU_W-1:0] mu_t;
  typedef mu_t [N_LABELS-1:0] mu_vec_t;      // degree of membership per label

  typedef logic [2:0] sw_state_t;            // {c, b, a}

  // Active vector Vk (k = 1..6) of the hexagon, as a switching state.
  function automatic sw_state_t active_vector(input logic [2:0] k);
    case (k)
      3'd1:    return 3'b001;
      3'd2:    return 3'b011;
      3'd3:    return 3'b010;
      3'd4:    return 3'b110;
      3'd5:    return 3'b100;
      3'd6:    return 3'b101;
      default: return 3'b000;
    endcase
  endfunction

  // Observation word of the controller, for a display or a test bench.
  typedef struct packed {
    logic               pi_update;    // frequency command just updated
    logic               pi_at_max;    // last update clipped at F_MAX
    logic               pi_at_min;    // last update clipped at F_MIN
    logic               vf_limited;   // modulation index held at its limit
    logic [10:0]        u_pos;        // defuzzified output, 768 = z
    logic signed [15:0] e;            // speed error, rpm
    logic signed [15:0] ce;           // change in error, rpm per sample
    logic [2:0]         sector;       // sector being modulated, 1..6
    logic               tick;         // modulator sampling instant
    sw_state_t          leg;          // switching state before dead band
  } ctrl_status_t;

endpackage
