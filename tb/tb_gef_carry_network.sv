// Self-checking testbench of gef_carry_network.
//
// Five networks are built from different delay profiles and operators:
//   u_eq  16 positions, equal profile, and-or operator on (g, r), OPD = 1:
//         the schedule must have 32 operators ((L/2) log2 L) and the carry
//         times of the published 16-carry example network (c0 at 0, c1 at 1,
//         c2..c3 at 2, c4..c7 at 3, c8..c15 at 4).
//   u_f3  9 positions, mux operator, half-unit times (OPD = 2): carry in at
//         t = 12, bits 1..4 at t = 10, bits 5..8 at t = 10.5. The carry of
//         bit 4 must come at t = 13 and that of bit 8 at t = 14.
//   u_dl  12 positions, exclusive-or operator, an irregular profile.
//   u_np  10 positions, and-or operator on (g, p), a falling profile.
//   u_r3  9 positions, equal profile, fan-in 3 allowed (OPD = 2, OPD3 = 3):
//         three 3-bit blocks at 3 and c8 at 6 (fan-in 2 would need 8); the
//         other carries at c1 2, c2 3, c3..c5 5, c6..c8 6, with 12 operators,
//         6 of them three-input cells.
// Each is driven with random operands, and every carry is compared with a
// bit-serial majority-function reference. One check per carry vector.
module tb_gef_carry_network;
  import gef_pkg::*;

  localparam int unsigned NVEC = 4000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // Reference carries: c[i] is the carry out of bit i of a + b.
  function automatic logic [31:0] ref_carry(logic [31:0] a, logic [31:0] b, int n);
    logic [31:0] c;
    logic cy;
    c = '0;
    cy = 1'b0;
    for (int i = 0; i < n; i++) begin
      cy = (a[i] & b[i]) | (a[i] & cy) | (b[i] & cy);
      c[i] = cy;
    end
    return c;
  endfunction

  // Leaf pair of one bit, written out per operator.
  function automatic gef_pair_t leaf(gef_op_e op, logic a, logic b);
    gef_pair_t t;
    case (op)
      GEF_NABLA_P: t = '{u: a & b, v: a ^ b};
      GEF_NABLA_R: t = '{u: a & b, v: a | b};
      GEF_DELTA:   t = '{u: a & b, v: a ^ b};
      default:     t = '{u: a | b, v: a & b};
    endcase
    return t;
  endfunction

  logic [31:0] a, b;

  // u_eq
  gef_pair_t [15:1] pr_eq;
  logic [15:0] c_eq;
  gef_carry_network #(.L(16), .OP(GEF_NABLA_R), .OPD(1), .DP('0)) u_eq (
    .c0(a[0] & b[0]), .prim(pr_eq), .c(c_eq));

  // u_f3
  localparam logic [8:0][GEF_TW-1:0] DP_F3 =
    {16'd21, 16'd21, 16'd21, 16'd21, 16'd20, 16'd20, 16'd20, 16'd20, 16'd24};
  gef_pair_t [8:1] pr_f3;
  logic [8:0] c_f3;
  gef_carry_network #(.L(9), .OP(GEF_MUX), .OPD(2), .DP(DP_F3)) u_f3 (
    .c0(a[0] & b[0]), .prim(pr_f3), .c(c_f3));

  // u_dl
  localparam logic [11:0][GEF_TW-1:0] DP_DL =
    {16'd3, 16'd0, 16'd0, 16'd5, 16'd1, 16'd1, 16'd1, 16'd0, 16'd4, 16'd2, 16'd0, 16'd1};
  gef_pair_t [11:1] pr_dl;
  logic [11:0] c_dl;
  gef_carry_network #(.L(12), .OP(GEF_DELTA), .OPD(2), .DP(DP_DL)) u_dl (
    .c0(a[0] & b[0]), .prim(pr_dl), .c(c_dl));

  // u_np
  localparam logic [9:0][GEF_TW-1:0] DP_NP =
    {16'd0, 16'd1, 16'd2, 16'd3, 16'd4, 16'd5, 16'd6, 16'd7, 16'd8, 16'd9};
  gef_pair_t [9:1] pr_np;
  logic [9:0] c_np;
  gef_carry_network #(.L(10), .OP(GEF_NABLA_P), .OPD(1), .DP(DP_NP)) u_np (
    .c0(a[0] & b[0]), .prim(pr_np), .c(c_np));

  // u_r3
  gef_pair_t [8:1] pr_r3;
  logic [8:0] c_r3;
  gef_carry_network #(.L(9), .OP(GEF_NABLA_R), .OPD(2), .FANIN(3), .OPD3(3), .DP('0)) u_r3 (
    .c0(a[0] & b[0]), .prim(pr_r3), .c(c_r3));

  always_comb begin
    for (int i = 1; i < 9; i++)  pr_r3[i] = leaf(GEF_NABLA_R, a[i], b[i]);
    for (int i = 1; i < 16; i++) pr_eq[i] = leaf(GEF_NABLA_R, a[i], b[i]);
    for (int i = 1; i < 9; i++)  pr_f3[i] = leaf(GEF_MUX, a[i], b[i]);
    for (int i = 1; i < 12; i++) pr_dl[i] = leaf(GEF_DELTA, a[i], b[i]);
    for (int i = 1; i < 10; i++) pr_np[i] = leaf(GEF_NABLA_P, a[i], b[i]);
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  localparam int EQ_TIME [16] = '{0, 1, 2, 2, 3, 3, 3, 3, 4, 4, 4, 4, 4, 4, 4, 4};
  localparam int R3_TIME [9] = '{0, 2, 3, 5, 5, 5, 6, 6, 6};

  initial begin
    logic [31:0] rc;
    a = '0;
    b = '0;
    // Schedule properties worked out by hand from the algorithm.
    check("eq: 32 operators", u_eq.N_OPS == 32);
    for (int i = 0; i < 16; i++)
      check($sformatf("eq: time of c%0d", i), int'(u_eq.C_TIME[i]) == EQ_TIME[i]);
    check("f3: c4 at t=13", u_f3.C_TIME[4] == 16'd26);
    check("f3: c8 at t=14", u_f3.C_TIME[8] == 16'd28);
    check("r3: 12 operators", u_r3.N_OPS == 12);
    check("r3: 6 three-input cells", u_r3.N_OP3 == 6);
    for (int i = 0; i < 9; i++)
      check($sformatf("r3: time of c%0d", i), int'(u_r3.C_TIME[i]) == R3_TIME[i]);
    check("np: c9 within 2 operators of the last input", u_np.C_TIME[9] <= 16'd11);
    $display("schedule: eq ops=%0d f3 ops=%0d dl ops=%0d np ops=%0d",
             u_eq.N_OPS, u_f3.N_OPS, u_dl.N_OPS, u_np.N_OPS);
    for (int v = 0; v < int'(NVEC); v++) begin
      @(posedge clk);
      a = $urandom();
      b = $urandom();
      if (v % 8 == 0) b = ~a;                 // long propagate chains
      if (v % 8 == 1) b = ~a ^ (32'h1 << (v % 16));
      @(negedge clk);
      rc = ref_carry(a, b, 16);
      check($sformatf("eq carries a=%h b=%h", a, b), c_eq == rc[15:0]);
      check($sformatf("f3 carries a=%h b=%h", a, b), c_f3 == rc[8:0]);
      check($sformatf("dl carries a=%h b=%h", a, b), c_dl == rc[11:0]);
      check($sformatf("np carries a=%h b=%h", a, b), c_np == rc[9:0]);
      check($sformatf("r3 carries a=%h b=%h", a, b), c_r3 == rc[8:0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NVEC + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
