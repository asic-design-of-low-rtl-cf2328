// XOR (sum) logic of the 4-bit carry pre-computation multiplier.
//
// With every column carry already known from the pre-carry logic, each product
// bit is the parity (XOR) of the partial products in its column and the
// carries that enter that column. All eight bits are formed in parallel; no
// carry ripples through this stage.
//
//   P[0] = pp1
//   P[1] = pp2 ^ pp5
//   P[2] = pp3 ^ pp6 ^ pp9  ^ c2
//   P[3] = pp4 ^ pp7 ^ pp10 ^ pp13 ^ c31
//   P[4] = pp8 ^ pp11 ^ pp14 ^ c32 ^ c41
//   P[5] = pp12 ^ pp15 ^ c42 ^ c51
//   P[6] = pp16 ^ c52 ^ c61
//   P[7] = c62 ^ c71
//
// The document names this stage and its XOR gates; the column membership above
// follows from its partial-product array. Purely combinational.
module xor_logic
  import cpc_pkg::*;
(
  input  logic [15:0] pp,       // partial products, pp[k-1] = pp_k
  input  precarry_t   c,        // pre-computed column carries
  output logic [7:0]  product   // 8-bit product
);

  logic [16:1] q;
  assign q = pp;

  always_comb begin
    product[0] = q[1];
    product[1] = q[2] ^ q[5];
    product[2] = q[3] ^ q[6] ^ q[9]  ^ c.c2;
    product[3] = q[4] ^ q[7] ^ q[10] ^ q[13] ^ c.c31;
    product[4] = q[8] ^ q[11] ^ q[14] ^ c.c32 ^ c.c41;
    product[5] = q[12] ^ q[15] ^ c.c42 ^ c.c51;
    product[6] = q[16] ^ c.c52 ^ c.c61;
    product[7] = c.c62 ^ c.c71;
  end

endmodule
