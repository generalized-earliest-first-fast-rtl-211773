// Carry network scheduled by the generalized earliest-first (GEF) algorithm.
//
// The network produces the carries c_0 .. c_{L-1} of an L-position carry
// chain (c_i is the carry out of bit i, c_0 = g_0). Its topology is not fixed:
// an elaboration-time function runs the GEF algorithm on the delay profile DP,
// the arrival time of the primitive terms of each bit position, and the
// generate loop below instantiates one gef_ternary_op (or, with FANIN = 3,
// gef_ternary_op3) per operator it placed.
//
// Scheduling (one run of GEF on an ordered list of terms):
//   1. The terms start in P_list, each with its bit range and arrival time.
//   2. All terms of P_list with the earliest time move to T_list, which is kept
//      in bit order; terms left over from earlier passes stay in T_list.
//   3. Runs of adjacent T_list terms (no other term between their ranges) are
//      paired from the least significant end; each pair becomes one operator,
//      whose output (time = later input + OPD) goes back into P_list. A term
//      without a partner stays in T_list. With FANIN = 3, three adjacent terms
//      go into one three-input cell (gef_ternary_op3, time + OPD3) wherever a
//      run has three left; a remaining two are paired.
//   4. Repeat until one term remains.
// The first run takes all L leaves and yields the most significant carry. Then
// every carry not yet built is produced, from the most significant down: it is
// split into the nearest carry already built below it plus, from there up, the
// widest intermediate terms already built, and GEF is run again on that list.
// Terms already built are reused this way, and a pairing that would rebuild
// an existing term takes the existing one instead.
//
// With an equal profile and L = 16 this gives the 32-operator, four-level
// network of the 17-bit example adder; unequal profiles give irregular,
// faster networks. Grouping from the least significant end, the OPD and OPD3
// time units and the choice between fan-in 2 and 3 are this design's
// choices; the rest follows the algorithm as published.
//
// Interface: c0 is the carry of bit 0, prim[i] the leaf pair of bit i
// (gef_pkg::gef_leaf); c[i] is the carry out of bit i. Purely combinational.
// The schedule is readable as localparams (N_OPS, C_TIME, ...).
module gef_carry_network
  import gef_pkg::*;
#(
  parameter int unsigned                   L     = 16,
  parameter gef_op_e                       OP    = GEF_NABLA_R,
  parameter int unsigned                   OPD   = 2,
  parameter int unsigned                   FANIN = 2,
  parameter int unsigned                   OPD3  = 3,
  parameter logic [L-1:0][GEF_TW-1:0]      DP    = '0
) (
  input  logic                c0,
  input  gef_pair_t [L-1:1]   prim,
  output logic      [L-1:0]   c
);

  // Upper bound on the number of terms (leaves plus operators).
  localparam int unsigned NMAX = L * L;
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
    logic [15:0]                kept;    // passes where a term waited in T_list
    logic [15:0]                reused;  // built terms used again
    logic [15:0]                decomp;  // carries built by decomposition
    logic [15:0]                n3;      // 3-input cells
    logic [L-1:0][IW-1:0]       cnode;   // term holding carry i
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
    int cn [L];
    int pl [L];
    int tl [L];
    int tk [L];
    int n, np, nt, nk, tmin, j, pos, best, bhi, id, x, y, z, ins, w, tx;
    int kept, reused, decomp, n3;
    sch.isc = '0;
    for (int k = 0; k < int'(NMAX); k++) sch.nd[k] = '0;
    kept = 0;
    reused = 0;
    decomp = 0;
    n3 = 0;
    for (int i = 0; i < int'(L); i++) begin
      lo[i] = i;
      hi[i] = i;
      tt[i] = int'(DP[i]);
      oa[i] = 0;
      ob[i] = 0;
      oc[i] = -1;
      cn[i] = -1;
    end
    cn[0] = 0;
    n = int'(L);
    for (int job = int'(L) - 1; job >= 1; job--) begin
      np = 0;
      if (job == int'(L) - 1) begin
        for (int i = 0; i < int'(L); i++) pl[i] = i;
        np = int'(L);
      end else if (cn[job] < 0) begin
        decomp++;
        j = job - 1;
        while (cn[j] < 0) j--;
        pl[0] = cn[j];
        if (cn[j] >= int'(L)) reused++;
        np = 1;
        pos = j + 1;
        while (pos <= job) begin
          best = pos;
          bhi = pos;
          for (int k = int'(L); k < n; k++)
            if (lo[k] == pos && hi[k] <= job && hi[k] > bhi) begin
              best = k;
              bhi = hi[k];
            end
          if (best >= int'(L)) reused++;
          pl[np] = best;
          np++;
          pos = bhi + 1;
        end
      end
      nt = 0;
      while (np + nt > 1) begin
        // Step 2: move the earliest terms of P_list into T_list, in bit order.
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
        // Step 3: combine adjacent terms of T_list from the low end, three
        // at a time where FANIN = 3 allows it, else in pairs.
        nk = 0;
        for (int k = 0; k < nt; k++) begin
          if (k + 1 < nt && hi[tl[k]] + 1 == lo[tl[k+1]]) begin
            w = (FANIN >= 3 && k + 2 < nt && hi[tl[k+1]] + 1 == lo[tl[k+2]]) ? 3 : 2;
            x = tl[k];
            y = tl[k+1];
            z = (w == 3) ? tl[k+2] : tl[k+1];
            id = -1;
            for (int m = int'(L); m < n; m++)
              if (lo[m] == lo[x] && hi[m] == hi[z]) id = m;
            if (id >= 0) begin
              reused++;
            end else begin
              id = n;
              lo[n] = lo[x];
              hi[n] = hi[z];
              tx = (tt[x] > tt[y]) ? tt[x] : tt[y];
              tx = (tx > tt[z]) ? tx : tt[z];
              tt[n] = tx + ((w == 3) ? int'(OPD3) : int'(OPD));
              oa[n] = x;
              ob[n] = y;
              oc[n] = (w == 3) ? z : -1;
              if (w == 3) n3++;
              n++;
            end
            if (lo[id] == 0 && cn[hi[id]] < 0) cn[hi[id]] = id;
            pl[np] = id;
            np++;
            k += w - 1;
          end else begin
            tk[nk] = tl[k];
            nk++;
          end
        end
        if (nk > 0 && np > 0) kept++;
        for (int k = 0; k < nk; k++) tl[k] = tk[k];
        nt = nk;
      end
    end
    sch.n      = 16'(n);
    sch.kept   = 16'(kept);
    sch.reused = 16'(reused);
    sch.decomp = 16'(decomp);
    sch.n3     = 16'(n3);
    for (int i = 0; i < int'(L); i++) sch.cnode[i] = IW'(cn[i]);
    for (int k = 0; k < n; k++) begin
      sch.isc[k]    = (lo[k] == 0);
      sch.nd[k].opa = IW'(oa[k]);
      sch.nd[k].opb = IW'(ob[k]);
      sch.nd[k].opc = (oc[k] >= 0) ? IW'(oc[k]) : '0;
      sch.nd[k].tri3 = (oc[k] >= 0);
      sch.nd[k].t   = GEF_TW'(tt[k]);
    end
    return sch;
  endfunction

  localparam sched_t S = gef_schedule();

  // Schedule summary, for testbenches and reports.
  localparam int unsigned N_TERMS  = int'(S.n);
  localparam int unsigned N_OPS    = N_TERMS - L;
  localparam int unsigned N_KEPT   = int'(S.kept);
  localparam int unsigned N_REUSED = int'(S.reused);
  localparam int unsigned N_DECOMP = int'(S.decomp);
  localparam int unsigned N_OP3    = int'(S.n3);

  function automatic logic [L-1:0][GEF_TW-1:0] carry_times();
    logic [L-1:0][GEF_TW-1:0] t;
    for (int i = 0; i < int'(L); i++) t[i] = S.nd[S.cnode[i]].t;
    return t;
  endfunction
  localparam logic [L-1:0][GEF_TW-1:0] C_TIME = carry_times();

  // Sanity of the schedule: it fits the term table, every carry was built,
  // and no carry is ready before the primitive terms it depends on.
  initial begin
    assert (FANIN == 2 || FANIN == 3) else $error("gef_carry_network: FANIN must be 2 or 3");
    assert (N_TERMS <= NMAX && N_OPS >= (L - 1) / 2 && N_KEPT + N_REUSED + N_DECOMP + N_OP3 < NMAX * L)
      else $error("gef_carry_network: schedule out of range");
    for (int i = 0; i < int'(L); i++)
      assert (int'(C_TIME[i]) >= int'(DP[i]) && (i == 0 || int'(C_TIME[i]) >= int'(DP[i]) + int'(OPD)))
        else $error("gef_carry_network: carry %0d scheduled too early", i);
  end

  for (genvar k = 0; k < int'(N_TERMS); k++) begin : g_node
    gef_pair_t t;
    if (k == 0) begin : g_c0
      assign t = gef_carry_pair(OP, c0);
    end else if (k < int'(L)) begin : g_leaf
      assign t = prim[k];
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

  for (genvar i = 0; i < int'(L); i++) begin : g_c
    assign c[i] = g_node[S.cnode[i]].t.u;
  end

endmodule
