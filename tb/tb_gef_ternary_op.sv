// Self-checking testbench of gef_ternary_op.
//
// Every operator (and-or on (g, p), and-or on (g, r), mux, exclusive-or) is
// instantiated as a group cell and as a carry cell and driven with all 16
// combinations of its two input pairs. The reference gives each pair its
// meaning as a two-bit group of an adder and works out the combined group by
// evaluating the carry out for carry in 0 and 1 (for the mux rule) or the
// generate and propagate conditions (for the other rules). Pairs that cannot
// occur for the exclusive-or rule (g and p both 1) are skipped.
module tb_gef_ternary_op;
  import gef_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  gef_pair_t lo, hi;
  gef_pair_t y [4][2];

  for (genvar o = 0; o < 4; o++) begin : g_o
    for (genvar c = 0; c < 2; c++) begin : g_c
      gef_ternary_op #(.OP(gef_op_e'(o)), .CARRY(c[0])) u_op (.lo(lo), .hi(hi), .y(y[o][c]));
    end
  end

  // Carry out of a group for a given carry in, from its pair.
  function automatic logic cout(gef_op_e op, gef_pair_t t, logic cin);
    if (op == GEF_MUX) return cin ? t.u : t.v;
    return t.u | (t.v & cin);
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    gef_pair_t e;
    gef_op_e op;
    lo = '0;
    hi = '0;
    for (int v = 0; v < 16; v++) begin
      @(posedge clk);
      lo = gef_pair_t'(v[3:2]);
      hi = gef_pair_t'(v[1:0]);
      @(negedge clk);
      for (int o = 0; o < 4; o++) begin
        op = gef_op_e'(o);
        if (op == GEF_DELTA && ((lo.u & lo.v) || (hi.u & hi.v))) continue;
        // mux: r is the carry out with carry in 1, g with carry in 0.
        // and-or / xor: g is the carry out with carry in 0, p/r the condition
        // that a carry in passes.
        if (op == GEF_MUX) begin
          e.u = cout(op, hi, cout(op, lo, 1'b1));
          e.v = cout(op, hi, cout(op, lo, 1'b0));
        end else begin
          e.u = cout(op, hi, cout(op, lo, 1'b0));
          e.v = lo.v & hi.v;
        end
        check($sformatf("op %0d group lo=%b hi=%b y=%b", o, lo, hi, y[o][0]), y[o][0] == e);
        // Carry cell: lo is a known carry lo.u.
        e.u = cout(op, hi, lo.u);
        e.v = (op == GEF_MUX) ? e.u : 1'b0;
        check($sformatf("op %0d carry lo=%b hi=%b y=%b", o, lo, hi, y[o][1]), y[o][1] == e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
