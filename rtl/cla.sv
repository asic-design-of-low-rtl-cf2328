// Carry look-ahead adder.
//
// Adds two W-bit numbers and a carry-in. Bit i generates a carry
// (g = a & b) or propagates one (p = a ^ b). The bits are split into groups
// of GROUP bits. Inside a group every carry is written out as a
// sum of products of the group's g and p bits and the group's carry-in. For
// example, with base bit 0:
//   c[j+1] = g[j] | p[j]g[j-1] | ... | p[j]..p[1]g[0] | p[j]..p[0]c[0].
// So no carry ripples inside a group. Groups are chained by their carry-out.
// The document uses carry look-ahead adders to add the carry-save vectors but
// does not give their insides. The group size of four and the chaining between
// groups are this design's choice. Combinational.
module cla #(
  parameter int unsigned W     = 8,  // operand width
  parameter int unsigned GROUP = 4   // look-ahead group size
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W-1:0] g, p;
  logic [W:0]   c;       // c[i] is the carry into bit i

  always_comb begin
    g = a & b;
    p = a ^ b;
    c = '0;
    c[0] = cin;
    for (int unsigned base = 0; base < W; base += GROUP) begin
      for (int unsigned j = base; j < base + GROUP && j < W; j++) begin
        // product terms ending in g[m], for m = j down to base
        logic term;
        logic prop;      // p[j] & ... & p[m+1]
        logic cj;
        cj   = 1'b0;
        prop = 1'b1;
        for (int m = int'(j); m >= int'(base); m--) begin
          term = prop & g[m];
          cj   = cj | term;
          prop = prop & p[m];
        end
        // term through the whole group back to the group carry-in
        cj = cj | (prop & c[base]);
        c[j+1] = cj;
      end
    end
    sum  = p ^ c[W-1:0];
    cout = c[W];
  end

endmodule
