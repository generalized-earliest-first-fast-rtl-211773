// Sum network for the "p first" adder types, scheduled by the generalized
// earliest-first (GEF) algorithm.
//
// In the conditional-sum (operator GEF_MUX) and ELM (operator GEF_DELTA)
// adders the half-sum p_i does not wait for the carry: it is folded into the
// leaf of the bit below, and the sum itself comes out of the operator tree,
//   s_i = c_0 o (1) o .. o (i-2) o m_{i-1},
// where m_{i-1} is the modified leaf of bit i-1 for sum bit i:
//   GEF_MUX:    m = (p_i ^ r_{i-1}, p_i ^ g_{i-1})
//   GEF_DELTA:  m = (p_i ^ g_{i-1}, p_{i-1})
// This module builds s_2 .. s_L with the same scheduling as
// gef_carry_network: GEF is first run on c_0, the leaves 1 .. L-2 and the
// modified leaf at position L-1, giving the top sum bit; every lower sum is
// then split into the nearest carry already built plus the widest plain
// terms already built above it, followed by its own modified leaf, and GEF
// is run on that list. Terms that contain a modified leaf belong to one sum
// bit only and are never reused; plain terms are shared as in the carry
// network. The operators need not be the and-or kind: both rules above hold
// for any operand values, which is what makes the early merge possible.
//
// Interface: c0 is the carry of bit 0, prim[i] the plain leaf of bit i,
// mlf[e] the modified leaf at position e (it carries p_{e+1}); sm[e] is the
// sum bit e + 1. DP[i] is the arrival time of bit i (L + 1 entries), and a
// modified leaf is ready OPX after the later of its two bits. The modified
// leaves and the early merge follow the method; scheduling the sum bits with
// the carry procedure, the XOR time OPX and the fan-in choice are this
// design's. Purely combinational.
module gef_sum_network
  import gef_pkg::*;
#(
  parameter int unsigned                   L     = 16,
  parameter gef_op_e                       OP    = GEF_MUX,
  parameter int unsigned                   OPD   = 2,
  parameter int unsigned                   OPX   = 2,
  parameter int unsigned                   FANIN = 2,
  parameter int unsigned                   OPD3  = 3,
  parameter logic [L:0][GEF_TW-1:0]        DP    = '0
) (
  input  logic                c0,
  input  gef_pair_t [L-2:1]   prim,
  input  gef_pair_t [L-1:1]   mlf,
  output logic      [L-1:1]   sm
);

  // Terms 0 .. L-2 are c_0 and the plain leaves, terms L-1 .. 2L-3 the
  // modified leaves of positions 1 .. L-1, operators follow.
  localparam int unsigned NB   = 2 * L - 2;
  localparam int unsigned NMAX = L * L + L;
  localparam int unsigned IW   = $clog2(NMAX);

  typedef struct packed {
    logic [IW-1:0]     opa;  // less significant operand
    logic [IW-1:0]     opb;  // middle operand of a 3-input cell, else the more significant one
    logic [IW-1:0]     opc;  // more significant operand of a 3-input cell
    logic              tri3; // 3-input cell
    logic [GEF_TW-1:0] t;    // arrival time
  } node_t;

  typedef struct packed {
    logic [15:0]                n;       // number of terms
    logic [15:0]                reused;  // plain terms used again
    logic [15:0]                n3;      // 3-input cells
    logic [L-1:1][IW-1:0]       snode;   // term holding sum bit e + 1
    logic [NMAX-1:0]            isc;     // term starts at bit 0
    node_t [NMAX-1:0]           nd;
  } sched_t;

  function automatic sched_t gef_schedule();
    sched_t sch;
    int lo [NMAX];
    int hi [NMAX];
    int tt [NMAX];
    int oa [NMAX];
    int ob [NMAX];
    int oc [NMAX];
    bit md [NMAX];
    int cn [L];
    int sn [L];
    int pl [L+1];
    int tl [L+1];
    int tk [L+1];
    int n, np, nt, nk, tmin, j, pos, best, bhi, id, x, y, z, ins, w, tx;
    int reused, n3;
    sch.isc = '0;
    for (int k = 0; k < int'(NMAX); k++) sch.nd[k] = '0;
    reused = 0;
    n3 = 0;
    for (int i = 0; i < int'(L); i++) begin
      cn[i] = -1;
      sn[i] = -1;
    end
    for (int i = 0; i < int'(NB); i++) begin
      oa[i] = 0;
      ob[i] = 0;
      oc[i] = -1;
      if (i < int'(L) - 1) begin
        lo[i] = i;
        hi[i] = i;
        tt[i] = int'(DP[i]);
        md[i] = 1'b0;
      end else begin
        pos = i - int'(L) + 2;
        lo[i] = pos;
        hi[i] = pos;
        tx = (DP[pos] > DP[pos+1]) ? int'(DP[pos]) : int'(DP[pos+1]);
        tt[i] = tx + int'(OPX);
        md[i] = 1'b1;
      end
    end
    cn[0] = 0;
    n = int'(NB);
    for (int job = int'(L) - 1; job >= 1; job--) begin
      // The prefix 0 .. job-1 in plain terms, then the modified leaf.
      np = 0;
      if (job == int'(L) - 1) begin
        for (int i = 0; i < int'(L) - 1; i++) pl[i] = i;
        np = int'(L) - 1;
      end else begin
        j = job - 1;
        while (cn[j] < 0) j--;
        pl[0] = cn[j];
        if (cn[j] >= int'(NB)) reused++;
        np = 1;
        pos = j + 1;
        while (pos <= job - 1) begin
          best = pos;
          bhi = pos;
          for (int k = int'(NB); k < n; k++)
            if (!md[k] && lo[k] == pos && hi[k] <= job - 1 && hi[k] > bhi) begin
              best = k;
              bhi = hi[k];
            end
          if (best >= int'(NB)) reused++;
          pl[np] = best;
          np++;
          pos = bhi + 1;
        end
      end
      pl[np] = job + int'(L) - 2;
      np++;
      nt = 0;
      while (np + nt > 1) begin
        // Move the earliest terms of P_list into T_list, in bit order.
        if (np > 0) begin
          tmin = tt[pl[0]];
          for (int k = 1; k < np; k++) if (tt[pl[k]] < tmin) tmin = tt[pl[k]];
          nk = 0;
          for (int k = 0; k < np; k++) begin
            if (tt[pl[k]] == tmin) begin
              ins = nt;
              while (ins > 0 && lo[tl[ins-1]] > lo[pl[k]]) begin
                tl[ins] = tl[ins-1];
                ins--;
              end
              tl[ins] = pl[k];
              nt++;
            end else begin
              pl[nk] = pl[k];
              nk++;
            end
          end
          np = nk;
        end
        // Combine adjacent terms of T_list from the low end.
        nk = 0;
        for (int k = 0; k < nt; k++) begin
          if (k + 1 < nt && hi[tl[k]] + 1 == lo[tl[k+1]]) begin
            w = (FANIN >= 3 && k + 2 < nt && hi[tl[k+1]] + 1 == lo[tl[k+2]]) ? 3 : 2;
            x = tl[k];
            y = tl[k+1];
            z = (w == 3) ? tl[k+2] : tl[k+1];
            id = -1;
            if (!md[z])
              for (int m = int'(NB); m < n; m++)
                if (!md[m] && lo[m] == lo[x] && hi[m] == hi[z]) id = m;
            if (id >= 0) begin
              reused++;
            end else begin
              id = n;
              lo[n] = lo[x];
              hi[n] = hi[z];
              md[n] = md[z];
              tx = (tt[x] > tt[y]) ? tt[x] : tt[y];
              tx = (tx > tt[z]) ? tx : tt[z];
              tt[n] = tx + ((w == 3) ? int'(OPD3) : int'(OPD));
              oa[n] = x;
              ob[n] = y;
              oc[n] = (w == 3) ? z : -1;
              if (w == 3) n3++;
              n++;
            end
            if (lo[id] == 0 && !md[id] && cn[hi[id]] < 0) cn[hi[id]] = id;
            if (lo[id] == 0 && md[id]) sn[hi[id]] = id;
            pl[np] = id;
            np++;
            k += w - 1;
          end else begin
            tk[nk] = tl[k];
            nk++;
          end
        end
        for (int k = 0; k < nk; k++) tl[k] = tk[k];
        nt = nk;
      end
    end
    sch.n      = 16'(n);
    sch.reused = 16'(reused);
    sch.n3     = 16'(n3);
    for (int e = 1; e < int'(L); e++) sch.snode[e] = IW'(sn[e]);
    for (int k = 0; k < n; k++) begin
      sch.isc[k]     = (lo[k] == 0);
      sch.nd[k].opa  = IW'(oa[k]);
      sch.nd[k].opb  = IW'(ob[k]);
      sch.nd[k].opc  = (oc[k] >= 0) ? IW'(oc[k]) : '0;
      sch.nd[k].tri3 = (oc[k] >= 0);
      sch.nd[k].t    = GEF_TW'(tt[k]);
    end
    return sch;
  endfunction

  localparam sched_t S = gef_schedule();

  // Schedule summary, for testbenches and reports.
  localparam int unsigned N_TERMS  = int'(S.n);
  localparam int unsigned N_OPS    = N_TERMS - NB;
  localparam int unsigned N_REUSED = int'(S.reused);
  localparam int unsigned N_OP3    = int'(S.n3);

  // S_TIME[e]: time of sum bit e + 1 (entry 0 unused).
  function automatic logic [L-1:0][GEF_TW-1:0] sum_times();
    logic [L-1:0][GEF_TW-1:0] t;
    t[0] = '0;
    for (int e = 1; e < int'(L); e++) t[e] = S.nd[S.snode[e]].t;
    return t;
  endfunction
  localparam logic [L-1:0][GEF_TW-1:0] S_TIME = sum_times();

  // Sanity of the schedule: the operator suits the early merge, every sum
  // bit was built, and none is ready before its modified leaf.
  initial begin
    assert (OP == GEF_MUX || OP == GEF_DELTA)
      else $error("gef_sum_network: the early merge needs GEF_MUX or GEF_DELTA");
    assert (FANIN == 2 || FANIN == 3) else $error("gef_sum_network: FANIN must be 2 or 3");
    assert (L >= 3 && N_TERMS <= NMAX && N_OPS >= L - 1 && N_REUSED + N_OP3 < NMAX * L)
      else $error("gef_sum_network: schedule out of range");
    for (int e = 1; e < int'(L); e++)
      assert (int'(S.snode[e]) >= int'(NB) && int'(S_TIME[e]) >= int'(DP[e+1]) + int'(OPX) + int'(OPD))
        else $error("gef_sum_network: sum bit %0d not built or too early", e + 1);
  end

  for (genvar k = 0; k < int'(N_TERMS); k++) begin : g_node
    gef_pair_t t;
    if (k == 0) begin : g_c0
      assign t = gef_carry_pair(OP, c0);
    end else if (k < int'(L) - 1) begin : g_leaf
      assign t = prim[k];
    end else if (k < int'(NB)) begin : g_mlf
      assign t = mlf[k-int'(L)+2];
    end else if (S.nd[k].tri3) begin : g_op3
      gef_ternary_op3 #(
        .OP    (OP),
        .CARRY (S.isc[S.nd[k].opa])
      ) u_op (
        .lo  (g_node[S.nd[k].opa].t),
        .mid (g_node[S.nd[k].opb].t),
        .hi  (g_node[S.nd[k].opc].t),
        .y   (t)
      );
    end else begin : g_op
      gef_ternary_op #(
        .OP    (OP),
        .CARRY (S.isc[S.nd[k].opa])
      ) u_op (
        .lo (g_node[S.nd[k].opa].t),
        .hi (g_node[S.nd[k].opb].t),
        .y  (t)
      );
    end
  end

  for (genvar e = 1; e < int'(L); e++) begin : g_s
    assign sm[e] = g_node[S.snode[e]].t.u;
  end

endmodule
