// N-bit carry pre-computation multiplier (8 bits by default).
//
// Splits each operand into a high and a low half, A = {AH, AL} and
// B = {BH, BL}, and forms the four half-width products with smaller
// multipliers of the same kind:
//   P4 = AH*BH,  P3 = AH*BL,  P2 = AL*BH,  P1 = AL*BL.
// The product is P4*2^N + (P3 + P2)*2^(N/2) + P1. With H = N/2:
//   * Product[H-1:0] is P1[H-1:0] unchanged;
//   * the middle window, Product[N+H-1:H], is the sum of P3, P2 and the
//     N-bit word {P4[H-1:0], P1[N-1:H]}. A carry save adder reduces these three
//     words to a sum and a carry vector, and an N-bit carry look-ahead adder adds
//     them. Its carry-out is C1;
//   * Product[2N-1:N+H] is P4[N-1:H] plus C1 plus the top bit of the carry-save
//     carry vector, added by an H-bit carry look-ahead adder.
// At N = 8 the half-width multipliers are the 4-bit core (cpc_mult4). At larger
// N this module instantiates itself at N/2 until it reaches the core.
//
// The split, the four sub-multipliers and the CSA/CLA arrangement follow the
// document's 8-bit block diagram. In that diagram the upper adder's second
// operand is all zero. Here that operand carries the carry-save vector's top
// bit. The middle window can reach 2*2^N + 102 at N = 8 (for example
// 0x6f * 0xde), which needs a carry of 2 into the upper part, and a single C1
// cannot carry 2. Recursion beyond 8 bits is this design's choice: the document
// reports 16-bit results without drawing that multiplier.
//
// Unsigned operands, purely combinational. N must be a power of two, at least 4.
module cpc_mult
  import cpc_pkg::*;
#(
  parameter int unsigned N = 8   // operand width
) (
  input  logic [N-1:0]   a,        // multiplicand
  input  logic [N-1:0]   b,        // multiplier
  output logic [2*N-1:0] product   // a * b
);

  localparam int unsigned H = N / 2;

  if (N < CORE_WIDTH || (N & (N - 1)) != 0) begin : g_bad_width
    $error("cpc_mult: N must be a power of two of at least 4");
  end

  if (N == CORE_WIDTH) begin : g_core
    cpc_mult4 u_core (.a(a), .b(b), .product(product));
  end else begin : g_split
    logic [N-1:0] p4, p3, p2, p1;      // sub-products, each N bits
    logic [N-1:0] csa_sum, csa_carry;  // carry-save form of the middle window
    logic [N-1:0] mid;                 // Product[N+H-1:H]
    logic         c1;                  // carry out of the middle adder
    logic [H-1:0] hi;                  // Product[2N-1:N+H]
    logic         hi_cout;             // always 0: the product fits 2N bits

    if (H == CORE_WIDTH) begin : g_leaf
      cpc_mult4 u_hh (.a(a[N-1:H]), .b(b[N-1:H]), .product(p4));
      cpc_mult4 u_hl (.a(a[N-1:H]), .b(b[H-1:0]), .product(p3));
      cpc_mult4 u_lh (.a(a[H-1:0]), .b(b[N-1:H]), .product(p2));
      cpc_mult4 u_ll (.a(a[H-1:0]), .b(b[H-1:0]), .product(p1));
    end else begin : g_rec
      cpc_mult #(.N(H)) u_hh (.a(a[N-1:H]), .b(b[N-1:H]), .product(p4));
      cpc_mult #(.N(H)) u_hl (.a(a[N-1:H]), .b(b[H-1:0]), .product(p3));
      cpc_mult #(.N(H)) u_lh (.a(a[H-1:0]), .b(b[N-1:H]), .product(p2));
      cpc_mult #(.N(H)) u_ll (.a(a[H-1:0]), .b(b[H-1:0]), .product(p1));
    end

    csa #(.W(N)) u_csa (
      .x    ({p4[H-1:0], p1[N-1:H]}),
      .y    (p3),
      .z    (p2),
      .sum  (csa_sum),
      .carry(csa_carry)
    );

    cla #(.W(N)) u_cla_mid (
      .a   (csa_sum),
      .b   ({csa_carry[N-2:0], 1'b0}),
      .cin (1'b0),
      .sum (mid),
      .cout(c1)
    );

    cla #(.W(H)) u_cla_hi (
      .a   (p4[N-1:H]),
      .b   ({{(H-1){1'b0}}, csa_carry[N-1]}),
      .cin (c1),
      .sum (hi),
      .cout(hi_cout)
    );

    assign product = {hi, mid, p1[H-1:0]};

    // The product of two N-bit numbers fits 2N bits, so the upper adder
    // never carries out.
    always_comb begin
      assert (!hi_cout) else $error("cpc_mult: unexpected carry out of the upper adder");
    end
  end

endmodule
