// Carry network scheduled by dual-bit forward prediction (DFP).
//
// DFP is the simpler of the two delay-profile-driven schedulers: it builds
// the carry chain from the least significant bit up and, at every step,
// looks only at the arrival times of the next two bit positions n+1, n+2.
// With the incoming carry c_n ready at tc and the two leaves at t1, t2 it
// compares
//   ripple:      c_{n+1} = c_n o (n+1),  c_{n+2} = c_{n+1} o (n+2)
//                ready at max(max(tc, t1) + OPD, t2) + OPD
//   pair first:  q = (n+1) o (n+2),      c_{n+2} = c_n o q
//                ready at max(tc, max(t1, t2) + OPD) + OPD
// and takes the pair only when it makes c_{n+2} strictly earlier (ties go
// to the ripple step, which needs one operator less). When the pair is
// taken, c_{n+1} = c_n o (n+1) is built off the chain for its sum bit. A
// single position left at the top is rippled. With FA = 0 a ripple step is
// the ternary carry cell. With FA = 1 it is the carry of a full adder,
// maj(a_i, b_i, c_{i-1}), fed by the operand bits themselves: it does not
// wait for g and r, so it counts from TRG before the leaf time DP[i] and
// costs OPD (one full-adder carry per unit, as in the method's example). The
// pair-first option always uses ternary cells. This design takes the two-bit
// rule literally: the longer blocks the method can also form when many bits
// arrive well before the carry are not generated.
//
// Interface and timing as gef_carry_network: c0 is the carry of bit 0,
// prim[i] the leaf pair of bit i, a[i], b[i] the operand bits (read by
// full-adder steps only), c[i] the carry out of bit i, DP the arrival times
// of the leaves in a unit of which one operator takes OPD. Combinational.
module dfp_carry_network
  import gef_pkg::*;
#(
  parameter int unsigned                   L   = 16,
  parameter gef_op_e                       OP  = GEF_NABLA_R,
  parameter int unsigned                   OPD = 2,
  parameter bit                            FA  = 1'b0,
  parameter int unsigned                   TRG = 1,
  parameter logic [L-1:0][GEF_TW-1:0]      DP  = '0
) (
  input  logic                c0,
  input  gef_pair_t [L-1:1]   prim,
  input  logic      [L-1:1]   a,
  input  logic      [L-1:1]   b,
  output logic      [L-1:0]   c
);

  // Leaves, then at most three operators per two positions.
  localparam int unsigned NMAX = 3 * L;
  localparam int unsigned IW   = $clog2(NMAX);

  typedef struct packed {
    logic [IW-1:0]     opa;  // less significant operand
    logic [IW-1:0]     opb;  // more significant operand
    logic              fa;   // full-adder carry step
    logic [GEF_TW-1:0] t;    // arrival time
  } node_t;

  typedef struct packed {
    logic [15:0]          n;       // number of terms
    logic [15:0]          paired;  // steps that paired the next two bits
    logic [15:0]          rippled; // steps that rippled
    logic [15:0]          nfa;     // full-adder carry steps
    logic [L-1:0][IW-1:0] cnode;   // term holding carry i
    logic [NMAX-1:0]      isc;     // term starts at bit 0
    node_t [NMAX-1:0]     nd;
  } sched_t;

  function automatic sched_t dfp_schedule();
    sched_t sch;
    int tt [NMAX];
    int oa [NMAX];
    int ob [NMAX];
    int cn [L];
    int ts [L];
    int n, pos, tc, ta, tb, tq, cur, q, paired, rippled, nfa;
    logic [NMAX-1:0] isc;
    logic [NMAX-1:0] fa;
    for (int k = 0; k < int'(NMAX); k++) sch.nd[k] = '0;
    isc = '0;
    fa = '0;
    paired = 0;
    rippled = 0;
    nfa = 0;
    for (int i = 0; i < int'(L); i++) begin
      tt[i] = int'(DP[i]);
      // Input time of a ripple step at bit i: the operand bits for a full
      // adder, the leaf otherwise.
      ts[i] = FA ? ((int'(DP[i]) > int'(TRG)) ? int'(DP[i]) - int'(TRG) : 0) : int'(DP[i]);
      oa[i] = 0;
      ob[i] = 0;
      cn[i] = -1;
    end
    isc[0] = 1'b1;
    cn[0] = 0;
    n = int'(L);
    cur = 0;
    pos = 0;
    while (pos < int'(L) - 1) begin
      tc = tt[cur];
      if (pos + 2 <= int'(L) - 1) begin
        tq = ((tt[pos+1] > tt[pos+2]) ? tt[pos+1] : tt[pos+2]) + int'(OPD);
        tb = ((tc > tq) ? tc : tq) + int'(OPD);
        ta = ((tc > ts[pos+1]) ? tc : ts[pos+1]) + int'(OPD);
        ta = ((ta > ts[pos+2]) ? ta : ts[pos+2]) + int'(OPD);
      end else begin
        tq = 0;
        ta = 0;
        tb = 0;
      end
      // c_{pos+1} = c_pos o (pos+1): the ripple step, or the side carry.
      oa[n] = cur;
      ob[n] = pos + 1;
      tt[n] = ((tc > ts[pos+1]) ? tc : ts[pos+1]) + int'(OPD);
      isc[n] = 1'b1;
      fa[n] = FA;
      if (FA) nfa++;
      cn[pos+1] = n;
      n++;
      if (pos + 2 <= int'(L) - 1 && tb < ta) begin
        paired++;
        q = n;
        oa[n] = pos + 1;
        ob[n] = pos + 2;
        tt[n] = tq;
        n++;
        oa[n] = cur;
        ob[n] = q;
        tt[n] = tb;
        isc[n] = 1'b1;
        cn[pos+2] = n;
        cur = n;
        n++;
        pos += 2;
      end else begin
        rippled++;
        cur = n - 1;
        pos += 1;
      end
    end
    sch.n       = 16'(n);
    sch.paired  = 16'(paired);
    sch.rippled = 16'(rippled);
    sch.nfa     = 16'(nfa);
    sch.isc     = isc;
    for (int i = 0; i < int'(L); i++) sch.cnode[i] = IW'(cn[i]);
    for (int k = 0; k < n; k++) begin
      sch.nd[k].opa = IW'(oa[k]);
      sch.nd[k].opb = IW'(ob[k]);
      sch.nd[k].fa  = fa[k];
      sch.nd[k].t   = GEF_TW'(tt[k]);
    end
    return sch;
  endfunction

  localparam sched_t S = dfp_schedule();

  // Schedule summary, for testbenches and reports.
  localparam int unsigned N_TERMS   = int'(S.n);
  localparam int unsigned N_OPS     = N_TERMS - L;
  localparam int unsigned N_PAIRED  = int'(S.paired);
  localparam int unsigned N_RIPPLED = int'(S.rippled);
  localparam int unsigned N_FA      = int'(S.nfa);

  function automatic logic [L-1:0][GEF_TW-1:0] carry_times();
    logic [L-1:0][GEF_TW-1:0] t;
    for (int i = 0; i < int'(L); i++) t[i] = S.nd[S.cnode[i]].t;
    return t;
  endfunction
  localparam logic [L-1:0][GEF_TW-1:0] C_TIME = carry_times();

  // Sanity of the schedule: every position advanced once, and no carry is
  // ready before the primitive terms it depends on.
  initial begin
    assert (N_TERMS <= NMAX && N_PAIRED * 2 + N_RIPPLED == L - 1 && N_FA <= N_TERMS)
      else $error("dfp_carry_network: schedule out of range");
    for (int i = 0; i < int'(L); i++)
      assert (int'(C_TIME[i]) >= int'(DP[i]) - int'(TRG) && (i == 0 || int'(C_TIME[i]) + int'(TRG) >= int'(DP[i]) + int'(OPD)))
        else $error("dfp_carry_network: carry %0d scheduled too early", i);
  end

  for (genvar k = 0; k < int'(N_TERMS); k++) begin : g_node
    gef_pair_t t;
    if (k == 0) begin : g_c0
      assign t = gef_carry_pair(OP, c0);
    end else if (k < int'(L)) begin : g_leaf
      assign t = prim[k];
    end else if (S.nd[k].fa) begin : g_fa
      // Carry of a full adder on bit opb: majority of a, b and carry in.
      logic ci, co;
      assign ci = g_node[S.nd[k].opa].t.u;
      assign co = (a[S.nd[k].opb] & b[S.nd[k].opb]) | ((a[S.nd[k].opb] ^ b[S.nd[k].opb]) & ci);
      assign t  = gef_carry_pair(OP, co);
    end else begin : g_op
      gef_ternary_op #(
        .OP    (OP),
        .CARRY (S.isc[k])
      ) u_op (
        .lo (g_node[S.nd[k].opa].t),
        .hi (g_node[S.nd[k].opb].t),
        .y  (t)
      );
    end
  end

  for (genvar i = 0; i < int'(L); i++) begin : g_c
    assign c[i] = g_node[S.cnode[i]].t.u;
  end

endmodule
