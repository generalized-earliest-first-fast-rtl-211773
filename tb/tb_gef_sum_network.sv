// Testbench of gef_sum_network (p merged at the leaves).
//
// The testbench forms p, g, r, the plain leaves and the modified leaves
// itself from random operands and compares every sum bit s_2 .. s_L with
// the simulator's addition. Instances:
//   u_c16  L = 16, mux operator, equal profile: the 17-bit word, where the
//          early merge gains nothing: top sum bit at 10 half units.
//   u_c15  L = 15, mux operator, equal profile (16-bit word): top sum bit
//          at 8 half units, one operator sooner than the carry plus XOR.
//   u_e23  L = 23, exclusive-or operator, scattered profile (ELM adder).
//   u_c9   L = 9, mux operator, fan-in 3.
//   u_c7, u_e7  L = 7 (8-bit word), mux and exclusive-or operators, equal
//          profile: s_7 must be ready after three operator levels, the XOR
//          that forms the modified leaf of bit 6 overlapping the first level.
module tb_gef_sum_network;
  import gef_pkg::*;

  localparam int unsigned NVEC = 4000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  function automatic logic [23:0][GEF_TW-1:0] scatter();
    logic [23:0][GEF_TW-1:0] d;
    for (int i = 0; i < 24; i++) d[i] = GEF_TW'((i * 7 + 3) % 5);
    return d;
  endfunction
  localparam logic [23:0][GEF_TW-1:0] DP_SC = scatter();

  logic [23:0] a, b, p, g, r;
  gef_pair_t [22:1] lf_m, lf_d, ml_m, ml_d;
  logic [15:1] s16;
  logic [14:1] s15;
  logic [22:1] s23;
  logic [8:1]  s9;
  logic [6:1]  s7m, s7d;

  always_comb begin
    p = a ^ b;
    g = a & b;
    r = a | b;
    for (int i = 1; i < 23; i++) begin
      lf_m[i] = '{u: r[i], v: g[i]};
      lf_d[i] = '{u: g[i], v: p[i]};
      ml_m[i] = '{u: p[i+1] ^ r[i], v: p[i+1] ^ g[i]};
      ml_d[i] = '{u: p[i+1] ^ g[i], v: p[i]};
    end
  end

  gef_sum_network #(.L(16), .OP(GEF_MUX)) u_c16 (
    .c0(g[0]), .prim(lf_m[14:1]), .mlf(ml_m[15:1]), .sm(s16));
  gef_sum_network #(.L(15), .OP(GEF_MUX)) u_c15 (
    .c0(g[0]), .prim(lf_m[13:1]), .mlf(ml_m[14:1]), .sm(s15));
  gef_sum_network #(.L(23), .OP(GEF_DELTA), .DP(DP_SC)) u_e23 (
    .c0(g[0]), .prim(lf_d[21:1]), .mlf(ml_d[22:1]), .sm(s23));
  gef_sum_network #(.L(9), .OP(GEF_MUX), .FANIN(3)) u_c9 (
    .c0(g[0]), .prim(lf_m[7:1]), .mlf(ml_m[8:1]), .sm(s9));
  gef_sum_network #(.L(7), .OP(GEF_MUX)) u_c7 (
    .c0(g[0]), .prim(lf_m[5:1]), .mlf(ml_m[6:1]), .sm(s7m));
  gef_sum_network #(.L(7), .OP(GEF_DELTA)) u_e7 (
    .c0(g[0]), .prim(lf_d[5:1]), .mlf(ml_d[6:1]), .sm(s7d));

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic [24:0] sum;
    a = '0;
    b = '0;
    check("c16: top sum bit at 10", u_c16.S_TIME[15] == 16'd10);
    check("c15: top sum bit at 8", u_c15.S_TIME[14] == 16'd8);
    check("c9: a three-input cell", u_c9.N_OP3 > 0);
    check("c7: s7 after three levels", u_c7.S_TIME[6] == 16'd6);
    check("e7: s7 after three levels", u_e7.S_TIME[6] == 16'd6);
    check("plain terms reused", u_c16.N_REUSED + u_e23.N_REUSED > 0);
    $display("sum network: ops c16=%0d c15=%0d e23=%0d c9=%0d; top sum e23=%0d c9=%0d",
             u_c16.N_OPS, u_c15.N_OPS, u_e23.N_OPS, u_c9.N_OPS, u_e23.S_TIME[22], u_c9.S_TIME[8]);
    for (int v = 0; v < int'(NVEC); v++) begin
      @(posedge clk);
      a = 24'($urandom());
      b = 24'($urandom());
      case (v % 5)
        0: b = ~a;
        1: b = -a;
        2: b = ~a ^ (24'h1 << (v % 24));
        default: ;
      endcase
      @(negedge clk);
      sum = 25'(a) + 25'(b);
      for (int e = 1; e < 23; e++) begin
        if (e < 16) check($sformatf("c16 s%0d %h+%h", e + 1, a, b), s16[e] == sum[e+1]);
        if (e < 15) check($sformatf("c15 s%0d %h+%h", e + 1, a, b), s15[e] == sum[e+1]);
        check($sformatf("e23 s%0d %h+%h", e + 1, a, b), s23[e] == sum[e+1]);
        if (e < 9) check($sformatf("c9 s%0d %h+%h", e + 1, a, b), s9[e] == sum[e+1]);
        if (e < 7) check($sformatf("c7 s%0d %h+%h", e + 1, a, b), s7m[e] == sum[e+1]);
        if (e < 7) check($sformatf("e7 s%0d %h+%h", e + 1, a, b), s7d[e] == sum[e+1]);
      end
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
