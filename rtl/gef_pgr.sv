// Primitive term generation of an adder.
//
// For every bit position i of the two operands it forms the three primitive
// terms the carry network is built from: the propagate p_i = a_i ^ b_i (also
// used for the sums), the generate g_i = a_i & b_i and the transmit
// r_i = a_i | b_i. These are the standard definitions; the block is purely
// combinational, one gate level deep.
module gef_pgr #(
  parameter int unsigned W = 17
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] p,
  output logic [W-1:0] g,
  output logic [W-1:0] r
);

  always_comb begin
    p = a ^ b;
    g = a & b;
    r = a | b;
  end

endmodule
