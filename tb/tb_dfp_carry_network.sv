// Self-checking testbench of dfp_carry_network.
//
// Five networks, random operands, every carry compared with a bit-serial
// majority-function reference. Schedule checks worked out by hand:
//   u_fa  3 positions, half units (OPD = 2): carry at t = 2, bit 1 at 2.5,
//         bit 2 at 3. Rippling gives c2 at 4.5, pairing would give 5, so the
//         step must ripple (2 operators, c2 at 9 half units).
//   u_fb  the same profile with full-adder ripple steps (FA = 1, g and r one
//         half unit after the operands): c1 at 3, c2 at 4, two full-adder
//         carries.
//   u_f3  9 positions, mux operator: carry at 12, bits 1-4 at 10, bits 5-8
//         at 10.5. Every step pairs (4 pairs, 12 operators); c2 at 13,
//         c4 at 14, c6 at 15, c8 at 16 (the two-bit rule cannot reach the
//         t = 14 of four-bit blocks).
//   u_fq  the u_f3 profile with FA = 1: the pairs still win, and the four
//         side carries c1, c3, c5, c7 become full-adder carries.
//   u_eq  16 positions, equal profile, OPD = 1: the first step is a tie and
//         ripples (c1 at 1); from then on pairing wins every step, so c3 at
//         2, ..., c15 at 8, with 1 + 7 * 3 = 22 operators.
module tb_dfp_carry_network;
  import gef_pkg::*;

  localparam int unsigned NVEC = 3000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

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

  logic [31:0] a, b;

  localparam logic [2:0][GEF_TW-1:0] DP_FA = {16'd6, 16'd5, 16'd4};
  gef_pair_t [2:1] pr_fa;
  logic [2:0] c_fa;
  dfp_carry_network #(.L(3), .OP(GEF_NABLA_R), .OPD(2), .DP(DP_FA)) u_fa (
    .c0(a[0] & b[0]), .prim(pr_fa), .a(a[2:1]), .b(b[2:1]), .c(c_fa));
  logic [2:0] c_fb;
  dfp_carry_network #(.L(3), .OP(GEF_NABLA_R), .OPD(2), .FA(1'b1), .TRG(1), .DP(DP_FA)) u_fb (
    .c0(a[0] & b[0]), .prim(pr_fa), .a(a[2:1]), .b(b[2:1]), .c(c_fb));

  localparam logic [8:0][GEF_TW-1:0] DP_F3 =
    {16'd21, 16'd21, 16'd21, 16'd21, 16'd20, 16'd20, 16'd20, 16'd20, 16'd24};
  gef_pair_t [8:1] pr_f3;
  logic [8:0] c_f3;
  dfp_carry_network #(.L(9), .OP(GEF_MUX), .OPD(2), .DP(DP_F3)) u_f3 (
    .c0(a[0] & b[0]), .prim(pr_f3), .a(a[8:1]), .b(b[8:1]), .c(c_f3));
  logic [8:0] c_fq;
  dfp_carry_network #(.L(9), .OP(GEF_MUX), .OPD(2), .FA(1'b1), .DP(DP_F3)) u_fq (
    .c0(a[0] & b[0]), .prim(pr_f3), .a(a[8:1]), .b(b[8:1]), .c(c_fq));

  gef_pair_t [15:1] pr_eq;
  logic [15:0] c_eq;
  dfp_carry_network #(.L(16), .OP(GEF_NABLA_P), .OPD(1), .DP('0)) u_eq (
    .c0(a[0] & b[0]), .prim(pr_eq), .a(a[15:1]), .b(b[15:1]), .c(c_eq));

  always_comb begin
    for (int i = 1; i < 3; i++)  pr_fa[i] = '{u: a[i] & b[i], v: a[i] | b[i]};
    for (int i = 1; i < 9; i++)  pr_f3[i] = '{u: a[i] | b[i], v: a[i] & b[i]};
    for (int i = 1; i < 16; i++) pr_eq[i] = '{u: a[i] & b[i], v: a[i] ^ b[i]};
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic [31:0] rc;
    a = '0;
    b = '0;
    check("fa: ripples", u_fa.N_RIPPLED == 2 && u_fa.N_PAIRED == 0);
    check("fa: 2 operators", u_fa.N_OPS == 2);
    check("fa: c2 at 4.5", u_fa.C_TIME[2] == 16'd9);
    check("fb: full-adder ripple", u_fb.N_RIPPLED == 2 && u_fb.N_FA == 2);
    check("fb: c1 at 3", u_fb.C_TIME[1] == 16'd6);
    check("fb: c2 at 4", u_fb.C_TIME[2] == 16'd8);
    check("fq: pairs every step, four full-adder side carries",
          u_fq.N_PAIRED == 4 && u_fq.N_FA == 4 && u_fq.N_OPS == 12);
    check("fq: c8 at 16", u_fq.C_TIME[8] == 16'd32);
    check("fq: c1 at 13", u_fq.C_TIME[1] == 16'd26);
    check("f3: pairs every step", u_f3.N_PAIRED == 4 && u_f3.N_RIPPLED == 0);
    check("f3: 12 operators", u_f3.N_OPS == 12);
    check("f3: c2 at 13", u_f3.C_TIME[2] == 16'd26);
    check("f3: c4 at 14", u_f3.C_TIME[4] == 16'd28);
    check("f3: c6 at 15", u_f3.C_TIME[6] == 16'd30);
    check("f3: c8 at 16", u_f3.C_TIME[8] == 16'd32);
    check("eq: 1 ripple then 7 pairs", u_eq.N_RIPPLED == 1 && u_eq.N_PAIRED == 7);
    check("eq: 22 operators", u_eq.N_OPS == 22);
    check("eq: c1 at 1", u_eq.C_TIME[1] == 16'd1);
    check("eq: c15 at 8", u_eq.C_TIME[15] == 16'd8);
    for (int v = 0; v < int'(NVEC); v++) begin
      @(posedge clk);
      a = $urandom();
      b = $urandom();
      if (v % 4 == 0) b = ~a;
      @(negedge clk);
      rc = ref_carry(a, b, 16);
      check($sformatf("fa carries a=%h b=%h", a, b), c_fa == rc[2:0]);
      check($sformatf("f3 carries a=%h b=%h", a, b), c_f3 == rc[8:0]);
      check($sformatf("fb carries a=%h b=%h", a, b), c_fb == rc[2:0]);
      check($sformatf("fq carries a=%h b=%h", a, b), c_fq == rc[8:0]);
      check($sformatf("eq carries a=%h b=%h", a, b), c_eq == rc[15:0]);
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
