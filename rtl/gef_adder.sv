// Earliest-first carry-propagate adder (top level).
//
// Adds two W-bit two's complement operands, s = a + b modulo 2^W. The adder
// has three parts: gef_pgr forms p, g and r for every bit; gef_carry_network
// builds the carries c_0 .. c_{W-2} with a ternary-operator network that the
// GEF algorithm schedules for the delay profile DP; the sums are
// s_0 = p_0 and s_i = p_i ^ c_{i-1}, the "p last" rule of the carry-lookahead
// and conditional-carry adders. With SUM = GEF_SUM_P_FIRST (operators
// GEF_MUX or GEF_DELTA only, i.e. the conditional-sum and ELM adders) p_i is
// merged at the leaves instead and gef_sum_network schedules the sum bits
// s_2 .. s_{W-1} directly; s_1 = p_1 ^ g_0. c_0 = g_0, so there is no carry
// input, and like the published 17-bit example the adder has no carry
// output.
//
// Parameters:
//   W      operand and sum width (at least 3).
//   SCHED  scheduler of the carry network: the generalized earliest-first
//          algorithm (default, gef_carry_network) or dual-bit forward
//          prediction (dfp_carry_network).
//   OP     ternary operator; default the and-or operator on (g, r), i.e. the
//          type II carry-lookahead rule.
//   OPD    delay of one operator in the time unit of DP; the default 2 lets
//          half-operator times be given.
//   FANIN  2 or 3: largest operator fan-in the earliest-first scheduler may
//          use; OPD3 is the delay of a three-input cell. Forward prediction
//          always uses fan-in 2.
//   FA     forward prediction only: ripple steps are full-adder carries
//          fed by the operand bits, ready TRG after the operands (g and r
//          are ready at DP, TRG after the operands).
//   SUM    p last (default) or p first, see above; p first needs W >= 4 and
//          the earliest-first scheduler.
//   OPX    delay of the XOR that merges p_i into a leaf (p first only).
//   DP     DP[i] is the time the primitive terms of bit i are ready.
// The default, W = 17 with an equal profile and fan-in 2, is the example
// adder of the algorithm's description. The parameter set, the operator
// pair encoding and the time unit are this design's. Purely combinational.
module gef_adder
  import gef_pkg::*;
#(
  parameter int unsigned              W     = 17,
  parameter gef_sched_e               SCHED = GEF_SCHED_GEF,
  parameter gef_op_e                  OP    = GEF_NABLA_R,
  parameter int unsigned              OPD   = 2,
  parameter int unsigned              FANIN = 2,
  parameter int unsigned              OPD3  = 3,
  parameter gef_sum_e                 SUM   = GEF_SUM_P_LAST,
  parameter int unsigned              OPX   = 2,
  parameter bit                       FA    = 1'b0,
  parameter int unsigned              TRG   = 1,
  parameter logic [W-1:0][GEF_TW-1:0] DP    = '0
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s
);

  localparam int unsigned L = W - 1;

  logic [W-1:0] p, g, r;
  gef_pair_t [L-1:1] prim;

  gef_pgr #(.W(W)) u_pgr (
    .a (a),
    .b (b),
    .p (p),
    .g (g),
    .r (r)
  );

  always_comb begin
    for (int i = 1; i < int'(L); i++) prim[i] = gef_leaf(OP, p[i], g[i], r[i]);
  end

  if (SUM == GEF_SUM_P_FIRST) begin : g_pf
    gef_pair_t [L-1:1] mlf;
    logic      [L-1:1] sm;
    always_comb begin
      for (int e = 1; e < int'(L); e++) begin
        mlf[e].u = p[e+1] ^ prim[e].u;
        mlf[e].v = (OP == GEF_MUX) ? p[e+1] ^ prim[e].v : prim[e].v;
      end
    end
    gef_sum_network #(
      .L     (L),
      .OP    (OP),
      .OPD   (OPD),
      .OPX   (OPX),
      .FANIN (FANIN),
      .OPD3  (OPD3),
      .DP    (DP)
    ) u_sum (
      .c0   (g[0]),
      .prim (prim[L-2:1]),
      .mlf  (mlf),
      .sm   (sm)
    );
    assign s = {sm, p[1] ^ g[0], p[0]};
  end else begin : g_pl
    logic [L-1:0] c;
    if (SCHED == GEF_SCHED_DFP) begin : g_dfp
      dfp_carry_network #(
        .L   (L),
        .OP  (OP),
        .OPD (OPD),
        .FA  (FA),
        .TRG (TRG),
        .DP  (DP[L-1:0])
      ) u_carry (
        .c0   (g[0]),
        .prim (prim),
        .a    (a[L-1:1]),
        .b    (b[L-1:1]),
        .c    (c)
      );
    end else begin : g_gef
      gef_carry_network #(
        .L     (L),
        .OP    (OP),
        .OPD   (OPD),
        .FANIN (FANIN),
        .OPD3  (OPD3),
        .DP    (DP[L-1:0])
      ) u_carry (
        .c0   (g[0]),
        .prim (prim),
        .c    (c)
      );
    end
    assign s = p ^ {c, 1'b0};
  end

  initial begin
    assert (W >= 3) else $error("gef_adder: W must be at least 3");
    assert (SUM == GEF_SUM_P_LAST || (W >= 4 && SCHED == GEF_SCHED_GEF))
      else $error("gef_adder: p first needs W >= 4 and the earliest-first scheduler");
  end

endmodule
