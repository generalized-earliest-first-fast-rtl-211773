// End-to-end testbench of gef_adder.
//
// Fourteen adders (and three 5-bit ones) are built side by side and fed the same random operands (plus
// carry-chain corner cases); every sum is compared with the simulator's own
// addition modulo 2^W.
//   u_def   default parameters: 17 bits, and-or operator on (g, r), equal
//           profile. Its most significant carry must be ready after 4
//           operator delays (log2 16 levels), with 32 operators.
//   u_cca   17 bits, mux operator, equal profile.
//   u_f3    10 bits, mux operator, the half-unit profile of carry at 12,
//           bits 1-4 at 10, bits 5-8 at 10.5: carry 8 must be ready at 14.
//   u_mul   32 bits, and-or on (g, p), a hill-shaped profile like the final
//           adder of an array multiplier (middle bits latest).
//   u_dl    24 bits, exclusive-or operator, a scattered profile.
//   u_fall  12 bits, and-or on (g, r), a falling profile (MSB first).
//   u_dmul, u_df3  the u_mul and u_f3 adders with the dual-bit forward
//           prediction scheduler; the earliest-first schedule must never be
//           later, and must be earlier on at least one of them.
//   u_r3    10 bits, fan-in 3 allowed, equal profile: carry 8 must be ready
//           after two three-input cells (6 half units), 2 units sooner than
//           with fan-in 2.
//   u_cs16  16 bits, mux operator, p merged first (conditional-sum adder),
//           against u_cc16, the same adder with p merged last: with a word
//           length not of the form 2^n + 1 the early merge saves one
//           operator on the top sum bit (8 against 10 half units).
//   u_elm   the u_dl adder with p merged first (ELM adder).
//   u_cs3   10 bits, mux operator, p first, fan-in 3.
//   u_dfa   the u_fall adder with forward prediction and full-adder ripple
//           steps.
//   u_x5m, u_x5d, u_x5f  5-bit p-first mux, p-first exclusive-or and
//           full-adder forward-prediction adders, checked exhaustively
//           over all 1024 operand pairs.
// The schedule mechanisms are counted over the earliest-first adders: a term waiting in T_list
// for a later partner, an intermediate term reused by a later carry, a carry
// built by decomposition, and an unequal profile finishing earlier than the
// same adder would if every bit arrived with its latest bit; and over the
// forward-prediction adders a paired step and a rippled step; and a
// three-input cell; a full-adder ripple step; and a p-first adder whose top sum bit is earlier than
// with p last. Each must occur.
module tb_gef_adder;
  import gef_pkg::*;

  localparam int unsigned NVEC = 5000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  function automatic logic [31:0][GEF_TW-1:0] hill(int n);
    logic [31:0][GEF_TW-1:0] d;
    d = '0;
    for (int i = 0; i < n; i++) d[i] = GEF_TW'((i < n / 2) ? i : n - 1 - i);
    return d;
  endfunction

  function automatic logic [31:0][GEF_TW-1:0] scatter(int n);
    logic [31:0][GEF_TW-1:0] d;
    d = '0;
    for (int i = 0; i < n; i++) d[i] = GEF_TW'((i * 7 + 3) % 5);
    return d;
  endfunction

  function automatic logic [31:0][GEF_TW-1:0] falling(int n);
    logic [31:0][GEF_TW-1:0] d;
    d = '0;
    for (int i = 0; i < n; i++) d[i] = GEF_TW'(2 * (n - 1 - i));
    return d;
  endfunction

  localparam logic [31:0][GEF_TW-1:0] DP_MUL  = hill(32);
  localparam logic [31:0][GEF_TW-1:0] DP_DL   = scatter(24);
  localparam logic [31:0][GEF_TW-1:0] DP_FALL = falling(12);
  localparam logic [9:0][GEF_TW-1:0]  DP_F3 =
    {16'd0, 16'd21, 16'd21, 16'd21, 16'd21, 16'd20, 16'd20, 16'd20, 16'd20, 16'd24};

  logic [31:0] a, b;
  logic [16:0] s_def, s_cca;
  logic [9:0]  s_f3;
  logic [31:0] s_mul;
  logic [23:0] s_dl;
  logic [11:0] s_fall;
  logic [31:0] s_dmul;
  logic [9:0]  s_df3;
  logic [9:0]  s_r3;
  logic [15:0] s_cs16, s_cc16;
  logic [23:0] s_elm;
  logic [9:0]  s_cs3;
  logic [11:0] s_dfa;
  logic [4:0]  xa, xb, s_x5m, s_x5d, s_x5f;

  gef_adder u_def (.a(a[16:0]), .b(b[16:0]), .s(s_def));
  gef_adder #(.W(17), .OP(GEF_MUX)) u_cca (.a(a[16:0]), .b(b[16:0]), .s(s_cca));
  gef_adder #(.W(10), .OP(GEF_MUX), .DP(DP_F3)) u_f3 (.a(a[9:0]), .b(b[9:0]), .s(s_f3));
  gef_adder #(.W(32), .OP(GEF_NABLA_P), .OPD(1), .DP(DP_MUL)) u_mul (.a(a), .b(b), .s(s_mul));
  gef_adder #(.W(24), .OP(GEF_DELTA), .DP(DP_DL[23:0])) u_dl (.a(a[23:0]), .b(b[23:0]), .s(s_dl));
  gef_adder #(.W(12), .DP(DP_FALL[11:0])) u_fall (.a(a[11:0]), .b(b[11:0]), .s(s_fall));
  gef_adder #(.W(32), .SCHED(GEF_SCHED_DFP), .OP(GEF_NABLA_P), .OPD(1), .DP(DP_MUL))
    u_dmul (.a(a), .b(b), .s(s_dmul));
  gef_adder #(.W(10), .SCHED(GEF_SCHED_DFP), .OP(GEF_MUX), .DP(DP_F3))
    u_df3 (.a(a[9:0]), .b(b[9:0]), .s(s_df3));
  gef_adder #(.W(10), .FANIN(3)) u_r3 (.a(a[9:0]), .b(b[9:0]), .s(s_r3));
  gef_adder #(.W(16), .OP(GEF_MUX), .SUM(GEF_SUM_P_FIRST)) u_cs16 (.a(a[15:0]), .b(b[15:0]), .s(s_cs16));
  gef_adder #(.W(16), .OP(GEF_MUX)) u_cc16 (.a(a[15:0]), .b(b[15:0]), .s(s_cc16));
  gef_adder #(.W(24), .OP(GEF_DELTA), .SUM(GEF_SUM_P_FIRST), .DP(DP_DL[23:0]))
    u_elm (.a(a[23:0]), .b(b[23:0]), .s(s_elm));
  gef_adder #(.W(10), .OP(GEF_MUX), .SUM(GEF_SUM_P_FIRST), .FANIN(3)) u_cs3 (.a(a[9:0]), .b(b[9:0]), .s(s_cs3));
  gef_adder #(.W(12), .SCHED(GEF_SCHED_DFP), .FA(1'b1), .DP(DP_FALL[11:0]))
    u_dfa (.a(a[11:0]), .b(b[11:0]), .s(s_dfa));
  gef_adder #(.W(5), .OP(GEF_MUX), .SUM(GEF_SUM_P_FIRST)) u_x5m (.a(xa), .b(xb), .s(s_x5m));
  gef_adder #(.W(5), .OP(GEF_DELTA), .SUM(GEF_SUM_P_FIRST), .DP(DP_DL[4:0]))
    u_x5d (.a(xa), .b(xb), .s(s_x5d));
  gef_adder #(.W(5), .SCHED(GEF_SCHED_DFP), .FA(1'b1), .DP(DP_FALL[4:0]))
    u_x5f (.a(xa), .b(xb), .s(s_x5f));

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // Latest-bit time plus a balanced tree of ceil(log2 L) operators: what the
  // adder would take if every bit arrived with the latest one.
  function automatic int equal_bound(int max_dp, int l, int opd);
    return max_dp + $clog2(l) * opd;
  endfunction

  int n_kept, n_reused, n_decomp, n_faster, n_paired, n_rippled, n_gef_better, n_early;

  // Time of the top sum bit of a p-last adder: carry, then the final XOR.
  function automatic int p_last_time(int c_time, int dp_top, int opx);
    return ((c_time > dp_top) ? c_time : dp_top) + opx;
  endfunction

  initial begin
    logic [31:0] sum;
    a = '0;
    b = '0;
    xa = '0;
    xb = '0;
    check("def: 32 operators", u_def.g_pl.g_gef.u_carry.N_OPS == 32);
    check("def: MSB carry after 4 operators", u_def.g_pl.g_gef.u_carry.C_TIME[15] == 16'd8);
    check("cca: MSB carry after 4 operators", u_cca.g_pl.g_gef.u_carry.C_TIME[15] == 16'd8);
    check("f3: c8 at t=14", u_f3.g_pl.g_gef.u_carry.C_TIME[8] == 16'd28);
    n_kept   = u_def.g_pl.g_gef.u_carry.N_KEPT + u_cca.g_pl.g_gef.u_carry.N_KEPT + u_f3.g_pl.g_gef.u_carry.N_KEPT
             + u_mul.g_pl.g_gef.u_carry.N_KEPT + u_dl.g_pl.g_gef.u_carry.N_KEPT + u_fall.g_pl.g_gef.u_carry.N_KEPT;
    n_reused = u_def.g_pl.g_gef.u_carry.N_REUSED + u_cca.g_pl.g_gef.u_carry.N_REUSED + u_f3.g_pl.g_gef.u_carry.N_REUSED
             + u_mul.g_pl.g_gef.u_carry.N_REUSED + u_dl.g_pl.g_gef.u_carry.N_REUSED + u_fall.g_pl.g_gef.u_carry.N_REUSED;
    n_decomp = u_def.g_pl.g_gef.u_carry.N_DECOMP + u_cca.g_pl.g_gef.u_carry.N_DECOMP + u_f3.g_pl.g_gef.u_carry.N_DECOMP
             + u_mul.g_pl.g_gef.u_carry.N_DECOMP + u_dl.g_pl.g_gef.u_carry.N_DECOMP + u_fall.g_pl.g_gef.u_carry.N_DECOMP;
    n_faster = 0;
    if (int'(u_mul.g_pl.g_gef.u_carry.C_TIME[30]) < equal_bound(15, 31, 1)) n_faster++;
    if (int'(u_dl.g_pl.g_gef.u_carry.C_TIME[22]) < equal_bound(8, 23, 2)) n_faster++;
    if (int'(u_fall.g_pl.g_gef.u_carry.C_TIME[10]) < equal_bound(22, 11, 2)) n_faster++;
    if (int'(u_f3.g_pl.g_gef.u_carry.C_TIME[8]) < equal_bound(24, 9, 2)) n_faster++;
    $display("mechanisms: kept=%0d reused=%0d decomposed=%0d faster_than_equal=%0d",
             n_kept, n_reused, n_decomp, n_faster);
    $display("MSB carry times: def=%0d cca=%0d f3=%0d mul=%0d dl=%0d fall=%0d",
             u_def.g_pl.g_gef.u_carry.C_TIME[15], u_cca.g_pl.g_gef.u_carry.C_TIME[15], u_f3.g_pl.g_gef.u_carry.C_TIME[8],
             u_mul.g_pl.g_gef.u_carry.C_TIME[30], u_dl.g_pl.g_gef.u_carry.C_TIME[22], u_fall.g_pl.g_gef.u_carry.C_TIME[10]);
    $display("operators: def=%0d cca=%0d f3=%0d mul=%0d dl=%0d fall=%0d",
             u_def.g_pl.g_gef.u_carry.N_OPS, u_cca.g_pl.g_gef.u_carry.N_OPS, u_f3.g_pl.g_gef.u_carry.N_OPS,
             u_mul.g_pl.g_gef.u_carry.N_OPS, u_dl.g_pl.g_gef.u_carry.N_OPS, u_fall.g_pl.g_gef.u_carry.N_OPS);
    n_paired  = u_dmul.g_pl.g_dfp.u_carry.N_PAIRED + u_df3.g_pl.g_dfp.u_carry.N_PAIRED;
    n_rippled = u_dmul.g_pl.g_dfp.u_carry.N_RIPPLED + u_df3.g_pl.g_dfp.u_carry.N_RIPPLED;
    n_gef_better = 0;
    check("mul: earliest-first not later than forward prediction",
          u_mul.g_pl.g_gef.u_carry.C_TIME[30] <= u_dmul.g_pl.g_dfp.u_carry.C_TIME[30]);
    check("f3: earliest-first not later than forward prediction",
          u_f3.g_pl.g_gef.u_carry.C_TIME[8] <= u_df3.g_pl.g_dfp.u_carry.C_TIME[8]);
    if (u_mul.g_pl.g_gef.u_carry.C_TIME[30] < u_dmul.g_pl.g_dfp.u_carry.C_TIME[30]) n_gef_better++;
    if (u_f3.g_pl.g_gef.u_carry.C_TIME[8] < u_df3.g_pl.g_dfp.u_carry.C_TIME[8]) n_gef_better++;
    $display("forward prediction: paired=%0d rippled=%0d; MSB carry mul=%0d f3=%0d; ops mul=%0d f3=%0d",
             n_paired, n_rippled, u_dmul.g_pl.g_dfp.u_carry.C_TIME[30], u_df3.g_pl.g_dfp.u_carry.C_TIME[8],
             u_dmul.g_pl.g_dfp.u_carry.N_OPS, u_df3.g_pl.g_dfp.u_carry.N_OPS);
    check("a forward-prediction step paired two bits", n_paired > 0);
    check("a forward-prediction step rippled", n_rippled > 0);
    check("earliest-first beat forward prediction at least once", n_gef_better > 0);
    check("r3: c8 after two three-input cells", u_r3.g_pl.g_gef.u_carry.C_TIME[8] == 16'd6);
    check("a three-input cell was placed", u_r3.g_pl.g_gef.u_carry.N_OP3 > 0);
    $display("fan-in 3: three-input cells=%0d operators=%0d",
             u_r3.g_pl.g_gef.u_carry.N_OP3, u_r3.g_pl.g_gef.u_carry.N_OPS);
    check("cs16: top sum bit after 4 operators", u_cs16.g_pf.u_sum.S_TIME[14] == 16'd8);
    check("cc16: top carry after 4 operators", u_cc16.g_pl.g_gef.u_carry.C_TIME[14] == 16'd8);
    n_early = 0;
    if (int'(u_cs16.g_pf.u_sum.S_TIME[14]) < p_last_time(int'(u_cc16.g_pl.g_gef.u_carry.C_TIME[14]), 0, 2))
      n_early++;
    if (int'(u_elm.g_pf.u_sum.S_TIME[22]) < p_last_time(int'(u_dl.g_pl.g_gef.u_carry.C_TIME[22]), int'(DP_DL[23]), 2))
      n_early++;
    check("elm: p first not later than p last",
          int'(u_elm.g_pf.u_sum.S_TIME[22]) <= p_last_time(int'(u_dl.g_pl.g_gef.u_carry.C_TIME[22]), int'(DP_DL[23]), 2));
    check("cs3: a three-input cell in the sum network", u_cs3.g_pf.u_sum.N_OP3 > 0);
    $display("p first: top sum cs16=%0d (p last %0d) elm=%0d (p last %0d) cs3=%0d; ops cs16=%0d (p last %0d) elm=%0d cs3=%0d reused=%0d",
             u_cs16.g_pf.u_sum.S_TIME[14], p_last_time(int'(u_cc16.g_pl.g_gef.u_carry.C_TIME[14]), 0, 2),
             u_elm.g_pf.u_sum.S_TIME[22], p_last_time(int'(u_dl.g_pl.g_gef.u_carry.C_TIME[22]), int'(DP_DL[23]), 2),
             u_cs3.g_pf.u_sum.S_TIME[8], u_cs16.g_pf.u_sum.N_OPS, u_cc16.g_pl.g_gef.u_carry.N_OPS, u_elm.g_pf.u_sum.N_OPS, u_cs3.g_pf.u_sum.N_OPS,
             u_cs16.g_pf.u_sum.N_REUSED + u_elm.g_pf.u_sum.N_REUSED + u_cs3.g_pf.u_sum.N_REUSED);
    check("a p-first top sum bit beat p last", n_early > 0);
    check("a full-adder ripple step", u_dfa.g_pl.g_dfp.u_carry.N_FA > 0);
    $display("full-adder steps: %0d, MSB carry %0d", u_dfa.g_pl.g_dfp.u_carry.N_FA,
             u_dfa.g_pl.g_dfp.u_carry.C_TIME[10]);
    check("a term waited in T_list", n_kept > 0);
    check("an intermediate term was reused", n_reused > 0);
    check("a carry was built by decomposition", n_decomp > 0);
    check("every unequal profile beat the equal-profile bound", n_faster == 4);
    for (int v = 0; v < int'(NVEC); v++) begin
      @(posedge clk);
      a = $urandom();
      b = $urandom();
      case (v % 6)
        0: b = ~a;
        1: b = -a;
        2: b = ~a ^ (32'h1 << (v % 32));
        default: ;
      endcase
      @(negedge clk);
      sum = a + b;
      check($sformatf("def %h+%h=%h", a[16:0], b[16:0], s_def), s_def == sum[16:0]);
      check($sformatf("cca %h+%h=%h", a[16:0], b[16:0], s_cca), s_cca == sum[16:0]);
      check($sformatf("f3 %h+%h=%h", a[9:0], b[9:0], s_f3), s_f3 == sum[9:0]);
      check($sformatf("mul %h+%h=%h", a, b, s_mul), s_mul == sum);
      check($sformatf("dl %h+%h=%h", a[23:0], b[23:0], s_dl), s_dl == sum[23:0]);
      check($sformatf("fall %h+%h=%h", a[11:0], b[11:0], s_fall), s_fall == sum[11:0]);
      check($sformatf("dmul %h+%h=%h", a, b, s_dmul), s_dmul == sum);
      check($sformatf("df3 %h+%h=%h", a[9:0], b[9:0], s_df3), s_df3 == sum[9:0]);
      check($sformatf("r3 %h+%h=%h", a[9:0], b[9:0], s_r3), s_r3 == sum[9:0]);
      check($sformatf("cs16 %h+%h=%h", a[15:0], b[15:0], s_cs16), s_cs16 == sum[15:0]);
      check($sformatf("cc16 %h+%h=%h", a[15:0], b[15:0], s_cc16), s_cc16 == sum[15:0]);
      check($sformatf("elm %h+%h=%h", a[23:0], b[23:0], s_elm), s_elm == sum[23:0]);
      check($sformatf("cs3 %h+%h=%h", a[9:0], b[9:0], s_cs3), s_cs3 == sum[9:0]);
      check($sformatf("dfa %h+%h=%h", a[11:0], b[11:0], s_dfa), s_dfa == sum[11:0]);
    end
    for (int v = 0; v < 1024; v++) begin
      @(posedge clk);
      {xa, xb} = 10'(v);
      @(negedge clk);
      sum = 32'(xa) + 32'(xb);
      check($sformatf("x5m %h+%h=%h", xa, xb, s_x5m), s_x5m == sum[4:0]);
      check($sformatf("x5d %h+%h=%h", xa, xb, s_x5d), s_x5d == sum[4:0]);
      check($sformatf("x5f %h+%h=%h", xa, xb, s_x5f), s_x5f == sum[4:0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NVEC + 3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
