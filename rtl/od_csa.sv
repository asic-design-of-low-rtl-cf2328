// Product combiner of the operand-decomposition multiplier.
//
// Forms X*Y from the two sub-products of the decomposed operands:
//   X*Y = C*D - A*B + (2^N - 1)*B
// where A = ~X & ~Y, B = X & Y, C = ~X & Y and D = X & ~Y. This holds because
// X*Y = (X | Y)*(X & Y) + (X & ~Y)*(~X & Y) and X | Y = (2^N - 1) - A.
// The document writes the product as C*D - A*B. That leaves out the
// (2^N - 1)*B term, so this block adds it.
//
// All four terms are summed modulo 2^(2N) in carry-save form. The negative
// terms enter as one's complements, ~(A*B) and ~B (B zero-extended), and their
// two "+1"s go into the empty low bit of each carry vector:
//   CSA 1: C*D, ~(A*B), B*2^N           -> s1, k1
//   CSA 2: s1, {k1, 1}, ~B              -> s2, k2
//   CLA  : s2 + {k2, 1}                 -> product
// A carry of weight 2^(2N) is dropped, because the true result always fits in
// 2N bits. The document combines the two products with a carry save adder and a
// carry look-ahead adder. The correction term and this exact arrangement are
// this design's choice. Combinational.
module od_csa #(
  parameter int unsigned N = 8   // operand width; products are 2N bits
) (
  input  logic [2*N-1:0] prod_ab,   // A * B
  input  logic [2*N-1:0] prod_cd,   // C * D
  input  logic [N-1:0]   b_op,      // B = X & Y, for the correction term
  output logic [2*N-1:0] product    // X * Y
);

  localparam int unsigned W = 2 * N;

  logic [W-1:0] s1, k1, s2, k2;
  logic         cout_unused;     // weight 2^(2N): dropped

  csa #(.W(W)) u_csa1 (
    .x    (prod_cd),
    .y    (~prod_ab),
    .z    ({b_op, {N{1'b0}}}),
    .sum  (s1),
    .carry(k1)
  );

  csa #(.W(W)) u_csa2 (
    .x    (s1),
    .y    ({k1[W-2:0], 1'b1}),
    .z    (~{{N{1'b0}}, b_op}),
    .sum  (s2),
    .carry(k2)
  );

  cla #(.W(W)) u_cla (
    .a   (s2),
    .b   ({k2[W-2:0], 1'b1}),
    .cin (1'b0),
    .sum (product),
    .cout(cout_unused)
  );

endmodule
