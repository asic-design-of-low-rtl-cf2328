// Partial products generator of the 4-bit carry pre-computation multiplier.
//
// Each partial product is the AND of one multiplicand bit and one multiplier
// bit. They are numbered row by row as in the partial-product array: row r
// (r = 0..3) is A multiplied by B[r], and within a row the bit of A rises from
// A[0] to A[3]. So pp[4*r + i] = A[i] & B[r], and pp[k-1] is the partial product
// the array calls pp_k (pp_1 = A0B0, pp_4 = A3B0, pp_13 = A0B3, pp_16 = A3B3).
// Partial product pp_k sits in column (k-1)%4 + (k-1)/4 + 1 of the array.
//
// The AND-gate partial products and their numbering follow the document's
// partial-product array; the packing into one 16-bit bus is this design's.
// Purely combinational; no clock, no reset.
module pp_gen4 (
  input  logic [3:0]  a,   // multiplicand
  input  logic [3:0]  b,   // multiplier
  output logic [15:0] pp   // pp[k-1] = pp_k
);

  always_comb begin
    for (int r = 0; r < 4; r++) begin
      for (int i = 0; i < 4; i++) begin
        pp[4*r + i] = a[i] & b[r];
      end
    end
  end

endmodule
