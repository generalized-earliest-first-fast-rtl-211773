// Three-operand operator cell of the carry network (fan-in 3).
//
// It combines three adjacent terms lo, mid, hi (least to most significant)
// into one term in a single complex cell, the fan-in 3 counterpart of
// gef_ternary_op. For the and-or rule this is the and-or-invert form
//   u = g_h | v_h & g_m | v_h & v_m & g_l,   v = v_l & v_m & v_h;
// for the mux and exclusive-or rules it is the flattened composition
// (lo o mid) o hi. The result equals two cascaded fan-in 2 cells, but the
// scheduler gives it one cell delay (OPD3). When CARRY is set, lo is a carry
// and only u is computed. Pair meanings as in gef_pkg. Combinational.
module gef_ternary_op3
  import gef_pkg::*;
#(
  parameter gef_op_e OP    = GEF_NABLA_R,
  parameter bit      CARRY = 1'b0
) (
  input  gef_pair_t lo,
  input  gef_pair_t mid,
  input  gef_pair_t hi,
  output gef_pair_t y
);

  logic u_n;
  logic v_n;

  always_comb begin
    unique case (OP)
      GEF_NABLA_P, GEF_NABLA_R: begin
        u_n = hi.u | (hi.v & mid.u) | (hi.v & mid.v & lo.u);
        v_n = lo.v & mid.v & hi.v;
      end
      GEF_DELTA: begin
        u_n = hi.u ^ (hi.v & (mid.u ^ (mid.v & lo.u)));
        v_n = lo.v & mid.v & hi.v;
      end
      default: begin
        u_n = lo.u ? (mid.u ? hi.u : hi.v) : (mid.v ? hi.u : hi.v);
        v_n = lo.v ? (mid.u ? hi.u : hi.v) : (mid.v ? hi.u : hi.v);
      end
    endcase
  end

  if (CARRY) begin : g_carry
    assign y = gef_carry_pair(OP, u_n);
  end else begin : g_group
    assign y = '{u: u_n, v: v_n};
  end

endmodule
