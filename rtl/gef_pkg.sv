// Shared types of the earliest-first adder.
//
// Every node of the carry network carries a pair of signals, called u and v
// here. What the pair means depends on the ternary operator the adder is built
// with, selected by gef_op_e:
//   GEF_NABLA_P  u = g, v = p   combine  u = g_h | (p_h & g_l),   v = p_l & p_h
//   GEF_NABLA_R  u = g, v = r   combine  u = g_h | (r_h & g_l),   v = r_l & r_h
//   GEF_MUX      u = r, v = g   combine  u = u_l ? r_h : g_h,     v = v_l ? r_h : g_h
//   GEF_DELTA    u = g, v = p   combine  u = g_h ^ (p_h & g_l),   v = p_l & p_h
// (_l is the less significant operand, _h the more significant one.) The first
// two are the carry-lookahead rules, the third the conditional-sum/carry rule,
// the fourth the exclusive-or form that needs g and p mutually exclusive.
// A term whose range starts at bit 0 is a carry; it is held as the pair
// (c, 0) for the and-or and exclusive-or rules and (c, c) for the mux rule,
// so that the same combining rule applies to it, and the carry is always u.
package gef_pkg;

  typedef enum logic [1:0] {
    GEF_NABLA_P = 2'd0,
    GEF_NABLA_R = 2'd1,
    GEF_MUX     = 2'd2,
    GEF_DELTA   = 2'd3
  } gef_op_e;

  // Scheduler that places the operators of the carry network.
  typedef enum logic {
    GEF_SCHED_GEF = 1'b0,  // generalized earliest-first
    GEF_SCHED_DFP = 1'b1   // dual-bit forward prediction
  } gef_sched_e;

  // Where the half-sum p_i enters: after the carry (carry-lookahead and
  // conditional-carry adders) or at the leaves (ELM and conditional-sum).
  typedef enum logic {
    GEF_SUM_P_LAST  = 1'b0,
    GEF_SUM_P_FIRST = 1'b1
  } gef_sum_e;

  typedef struct packed {
    logic u;
    logic v;
  } gef_pair_t;

  // Width of one entry of a delay profile and of the scheduled arrival times.
  localparam int unsigned GEF_TW = 16;

  // Leaf pair of bit position i > 0 for operator op.
  function automatic gef_pair_t gef_leaf(gef_op_e op, logic p, logic g, logic r);
    gef_pair_t t;
    unique case (op)
      GEF_NABLA_P, GEF_DELTA: t = '{u: g, v: p};
      GEF_NABLA_R:            t = '{u: g, v: r};
      default:                t = '{u: r, v: g};
    endcase
    return t;
  endfunction

  // Pair form of a known carry c for operator op.
  function automatic gef_pair_t gef_carry_pair(gef_op_e op, logic c);
    gef_pair_t t;
    t = (op == GEF_MUX) ? '{u: c, v: c} : '{u: c, v: 1'b0};
    return t;
  endfunction

endpackage
