// Pre-carry logic of the 4-bit carry pre-computation multiplier.
//
// Computes all column carries of the 4x4 partial-product array at once, so
// that the following XOR stage only has to take the parity of each column.
// Column k holds the partial products pp_k..., plus the carries that earlier
// columns send into it; c_k1 is bit 1 and c_k2 is bit 2 of that column's sum.
//
// Each carry is built as a two-way multiplexer. The select is the carry
// arriving from the previous column (c2, c31, c41 or c51). The two data inputs
// are precomputed from the column's own bits only:
//   * with select 0, bit 1 of the sum of three bits, i.e. their majority;
//   * with select 1, bit 1 of that sum plus one, which is 1 when the three bits
//     are not all equal;
// and in columns 4 and 5, where a fourth bit (pp_13, or c32 from column 3)
// joins, each data input is itself chosen by that fourth bit, the "sum plus
// two" case being the majority of the complemented bits. The bit-2 carries are
// true only when enough of the column's bits are set. This follows the
// document's carry equations term by term; the column sums bound every column
// below 8, so no higher carry exists and the product is exact.
//
// Purely combinational. Input pp[k-1] is partial product pp_k.
module pre_carry_logic
  import cpc_pkg::*;
(
  input  logic [15:0] pp,   // partial products, pp[k-1] = pp_k
  output precarry_t   c     // pre-computed column carries
);

  // q[k] = pp_k, numbered as in the array; pp_1 is alone in column 1 and
  // takes part in no carry
  logic [16:2] q;
  assign q = pp[15:1];

  // majority of three bits: bit 1 of their sum
  function automatic logic maj3(input logic u, input logic v, input logic w);
    return (u & v) | (w & (u | v));
  endfunction

  // three bits not all equal: bit 1 of their sum plus one
  function automatic logic neq3(input logic u, input logic v, input logic w);
    return (w & ~v) | (u & ~w) | (~u & v);
  endfunction

  // majority of the complements: bit 1 of their sum plus two
  function automatic logic nmaj3(input logic u, input logic v, input logic w);
    return (~u & ~v) | (~w & (~u | ~v));
  endfunction

  // column 3 candidates
  logic c3t1, c3t2;
  // column 4 candidates
  logic c41t1, c41t2;
  // column 5 candidates
  logic c51t1, c51t2;
  // column 6 candidates
  logic c6t1, c6t2;

  always_comb begin
    // column 2: pp2 + pp5
    c.c2  = q[5] & q[2];

    // column 3: pp3 + pp6 + pp9 + c2
    c3t1  = maj3(q[3], q[6], q[9]);
    c3t2  = neq3(q[3], q[6], q[9]);
    c.c31 = c.c2 ? c3t2 : c3t1;
    c.c32 = q[2] & q[5] & q[3] & q[6] & q[9];

    // column 4: pp4 + pp7 + pp10 + pp13 + c31
    c41t1 = q[13] ? neq3(q[4], q[7], q[10])  : maj3(q[4], q[7], q[10]);
    c41t2 = q[13] ? nmaj3(q[4], q[7], q[10]) : neq3(q[4], q[7], q[10]);
    c.c41 = c.c31 ? c41t2 : c41t1;
    c.c42 = (c.c31 & q[13] & maj3(q[4], q[7], q[10]))
          | (q[10] & q[7] & q[4] & (c.c31 | q[13]));

    // column 5: pp8 + pp11 + pp14 + c32 + c41
    c51t1 = c.c32 ? neq3(q[8], q[11], q[14])  : maj3(q[8], q[11], q[14]);
    c51t2 = c.c32 ? nmaj3(q[8], q[11], q[14]) : neq3(q[8], q[11], q[14]);
    c.c51 = c.c41 ? c51t2 : c51t1;
    c.c52 = (c.c41 & c.c32 & maj3(q[8], q[11], q[14]))
          | (q[14] & q[11] & q[8] & (c.c41 | c.c32));

    // column 6: pp12 + pp15 + c42 + c51
    c6t1  = maj3(q[12], q[15], c.c42);
    c6t2  = neq3(q[12], q[15], c.c42);
    c.c61 = c.c51 ? c6t2 : c6t1;
    c.c62 = c.c51 & c.c42 & q[12] & q[15];

    // column 7: pp16 + c52 + c61
    c.c71 = maj3(c.c52, q[16], c.c61);
  end

endmodule
