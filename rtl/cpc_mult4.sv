// 4-bit carry pre-computation multiplier (the core of the design).
//
// Three stages in a row, all combinational:
//   1. pp_gen4         forms the 16 partial products A[i] & B[r];
//   2. pre_carry_logic computes every column carry of the partial-product
//                      array directly, with multiplexers selected by the
//                      carry of the previous column;
//   3. xor_logic       takes the parity of each column with its carries.
// The result is the exact 8-bit product of two unsigned 4-bit numbers.
// Structure and carry equations follow the document; there is no clock.
module cpc_mult4
  import cpc_pkg::*;
(
  input  logic [3:0] a,        // multiplicand
  input  logic [3:0] b,        // multiplier
  output logic [7:0] product   // a * b
);

  logic [15:0] pp;
  precarry_t   carries;

  pp_gen4         u_ppg (.a(a), .b(b), .pp(pp));
  pre_carry_logic u_pcl (.pp(pp), .c(carries));
  xor_logic       u_xor (.pp(pp), .c(carries), .product(product));

endmodule
