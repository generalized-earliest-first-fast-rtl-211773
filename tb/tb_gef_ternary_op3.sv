// Self-checking testbench of gef_ternary_op3.
//
// Every operator, as a group cell and as a carry cell, is driven with all 64
// combinations of its three input pairs. The reference reads each pair as a
// bit-group summary (its carry out for carry in 0 and 1 for the mux rule;
// its generate and propagate conditions for the other rules) and works out
// the combined group by passing a carry through lo, mid and hi in turn.
// Pairs with g and p both 1 cannot occur for the exclusive-or rule and are
// skipped for it.
module tb_gef_ternary_op3;
  import gef_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  gef_pair_t lo, mid, hi;
  gef_pair_t y [4][2];

  for (genvar o = 0; o < 4; o++) begin : g_o
    for (genvar c = 0; c < 2; c++) begin : g_c
      gef_ternary_op3 #(.OP(gef_op_e'(o)), .CARRY(c[0])) u_op (
        .lo(lo), .mid(mid), .hi(hi), .y(y[o][c]));
    end
  end

  function automatic logic cout(gef_op_e op, gef_pair_t t, logic cin);
    if (op == GEF_MUX) return cin ? t.u : t.v;
    return t.u | (t.v & cin);
  endfunction

  function automatic logic thru(gef_op_e op, logic cin);
    return cout(op, hi, cout(op, mid, cout(op, lo, cin)));
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
    mid = '0;
    hi = '0;
    for (int v = 0; v < 64; v++) begin
      @(posedge clk);
      lo  = gef_pair_t'(v[5:4]);
      mid = gef_pair_t'(v[3:2]);
      hi  = gef_pair_t'(v[1:0]);
      @(negedge clk);
      for (int o = 0; o < 4; o++) begin
        op = gef_op_e'(o);
        if (op == GEF_DELTA && ((lo.u & lo.v) || (mid.u & mid.v) || (hi.u & hi.v))) continue;
        if (op == GEF_MUX) begin
          e.u = thru(op, 1'b1);
          e.v = thru(op, 1'b0);
        end else begin
          e.u = thru(op, 1'b0);
          e.v = lo.v & mid.v & hi.v;
        end
        check($sformatf("op %0d group %b %b %b -> %b", o, lo, mid, hi, y[o][0]), y[o][0] == e);
        e.u = cout(op, hi, cout(op, mid, lo.u));
        e.v = (op == GEF_MUX) ? e.u : 1'b0;
        check($sformatf("op %0d carry %b %b %b -> %b", o, lo, mid, hi, y[o][1]), y[o][1] == e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
