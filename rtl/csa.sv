// Carry save adder (3:2 compressor row).
//
// Adds three W-bit numbers without propagating carries: every bit position is
// an independent full adder. The result is kept as two vectors,
//   x + y + z = sum + 2 * carry,
// so carry[i] has weight 2^(i+1); carry[W-1] has weight 2^W and is the bit a
// caller must keep if the total can exceed W bits. The document names carry
// save adders as the first step of summing sub-products; the full-adder row is
// the usual form and is this design's choice. Combinational.
module csa #(
  parameter int unsigned W = 8   // operand width
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] sum,     // bitwise sum, weight 2^i
  output logic [W-1:0] carry    // bitwise carry, weight 2^(i+1)
);

  always_comb begin
    sum   = x ^ y ^ z;
    carry = (x & y) | (z & (x | y));
  end

endmodule
