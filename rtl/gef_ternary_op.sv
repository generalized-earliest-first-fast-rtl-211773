// One ternary operator cell of the carry network.
//
// It combines two adjacent terms, lo (less significant) and hi (more
// significant), into the term covering both ranges, with one of the three
// associative but non-commutative operators:
//   nabla  x nabla (y, z) = y | (z & x)      (and-or, carry lookahead)
//   mux    x otimes (y, z) = x ? y : z      (conditional sum / carry)
//   delta  x delta (y, z) = y ^ (z & x)      (exclusive-or form)
// applied pair-wise as in gef_pkg. When CARRY is set, lo is a carry and the
// cell is the cheaper three-input form: only u is computed, and v is the
// constant part of a carry pair. Combinational, one operator delay.
module gef_ternary_op
  import gef_pkg::*;
#(
  parameter gef_op_e OP    = GEF_NABLA_R,
  parameter bit      CARRY = 1'b0
) (
  input  gef_pair_t lo,
  input  gef_pair_t hi,
  output gef_pair_t y
);

  logic u_n;
  logic v_n;

  always_comb begin
    unique case (OP)
      GEF_NABLA_P, GEF_NABLA_R: begin
        u_n = hi.u | (hi.v & lo.u);
        v_n = lo.v & hi.v;
      end
      GEF_DELTA: begin
        u_n = hi.u ^ (hi.v & lo.u);
        v_n = lo.v & hi.v;
      end
      default: begin
        u_n = lo.u ? hi.u : hi.v;
        v_n = lo.v ? hi.u : hi.v;
      end
    endcase
  end

  if (CARRY) begin : g_carry
    assign y = gef_carry_pair(OP, u_n);
  end else begin : g_group
    assign y = '{u: u_n, v: v_n};
  end

endmodule
