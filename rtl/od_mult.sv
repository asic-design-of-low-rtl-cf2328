// Carry pre-computation multiplier with operand decomposition (top level).
//
// Multiplies two unsigned N-bit operands X and Y (N = 8 by default) and
// returns the 2N-bit product. The aim is a low power-delay product. The
// operands are first rewritten as four sparser words (operand_decomposer):
//   A = ~X & ~Y,  B = X & Y,  C = ~X & Y,  D = X & ~Y.
// Two N-bit carry pre-computation multipliers (cpc_mult) form A*B and C*D.
// Then od_csa adds C*D - A*B + (2^N - 1)*B in carry-save form and resolves the
// sum with a carry look-ahead adder.
//
// Interface: x, y in; product out. Purely combinational: no clock, no reset,
// no handshake. The product is valid one combinational delay after the
// operands change.
//
// The decomposition, the two 8-bit carry pre-computation multipliers and the
// final carry-save/look-ahead addition follow the document. The
// (2^N - 1)*B correction term is this design's own (see od_csa), as is the
// width parameter: the document draws this block at 8 bits.
module od_mult #(
  parameter int unsigned N = 8   // operand width, a power of two >= 4
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] product
);

  logic [N-1:0]   op_a, op_b, op_c, op_d;
  logic [2*N-1:0] prod1;   // A * B
  logic [2*N-1:0] prod2;   // C * D

  operand_decomposer #(.N(N)) u_dec (
    .x(x), .y(y), .a(op_a), .b(op_b), .c(op_c), .d(op_d)
  );

  cpc_mult #(.N(N)) u_mult_ab (.a(op_a), .b(op_b), .product(prod1));
  cpc_mult #(.N(N)) u_mult_cd (.a(op_c), .b(op_d), .product(prod2));

  od_csa #(.N(N)) u_comb (
    .prod_ab(prod1), .prod_cd(prod2), .b_op(op_b), .product(product)
  );

endmodule
