// Shared types of the carry pre-computation multiplier.
//
// The 4-bit core multiplier forms 16 partial products and then computes every
// column carry of the partial-product array directly from the partial products
// and from carries of earlier columns, instead of chaining adders. Those carries
// travel from the pre-carry logic to the XOR (sum) logic as one bundle, which is
// the struct below. The carry names are the document's; bundling them in a
// struct is this design's choice. Carry names follow the column numbering of the array:
// column k (k = 1..8, weight 2^(k-1)) produces c_k1, a carry of weight 2^k that
// enters column k+1, and, where the column can sum to four or more, c_k2, a
// carry of weight 2^(k+1) that enters column k+2.
package cpc_pkg;

  // Column carries of the 4x4 partial-product array (equations of the
  // pre-carry logic). Column 2 sums at most two bits and has a single carry;
  // column 7 sums at most three bits and also has a single carry.
  typedef struct packed {
    logic c2;   // column 2 -> column 3
    logic c31;  // column 3 -> column 4
    logic c32;  // column 3 -> column 5
    logic c41;  // column 4 -> column 5
    logic c42;  // column 4 -> column 6
    logic c51;  // column 5 -> column 6
    logic c52;  // column 5 -> column 7
    logic c61;  // column 6 -> column 7
    logic c62;  // column 6 -> column 8
    logic c71;  // column 7 -> column 8
  } precarry_t;

  // Width of the core multiplier that the larger multipliers are built from.
  localparam int unsigned CORE_WIDTH = 4;

endpackage
