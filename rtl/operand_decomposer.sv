// Operand decomposer.
//
// Splits two N-bit operands X and Y into four words that together hold the
// same information:
//   A = ~X & ~Y   (bits where both are 0)
//   B =  X &  Y   (bits where both are 1)
//   C = ~X &  Y   (bits only Y has)
//   D =  X & ~Y   (bits only X has)
// Here ~ is the bitwise complement. For any bit position at most one of C and
// D is 1. So C and D, and the often sparse B, hold more zeros than X and Y.
// This lowers switching in the multipliers that follow. The equations follow
// the document. Purely combinational.
module operand_decomposer #(
  parameter int unsigned N = 8   // operand width
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N-1:0] a,
  output logic [N-1:0] b,
  output logic [N-1:0] c,
  output logic [N-1:0] d
);

  always_comb begin
    a = ~x & ~y;
    b =  x &  y;
    c = ~x &  y;
    d =  x & ~y;
  end

endmodule
