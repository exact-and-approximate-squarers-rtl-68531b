// Recursive carry-lookahead adder built from 4-bit lookahead blocks.
//
// Each bit forms generate g = a & b and propagate p = a ^ b. A lookahead unit
// (cla_lcu) combines four groups into a group generate/propagate and computes the
// carry into each of its groups from the carry in; groups of more than four bits
// are themselves lookahead units, down to 4-bit blocks. The width is padded inside
// to the next power of four with zero bits. Sum = p ^ carry-in of each bit.
// Interface: W-bit a, b and carry in; W-bit sum and carry out. Combinational.
module cla_adder #(
  parameter int W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  function automatic int pow4_ceil(input int w);
    int p;
    p = 4;
    while (p < w) p = p * 4;
    return p;
  endfunction

  localparam int WP = pow4_ceil(W);

  logic [WP-1:0] p, g, c;
  logic          gp, gg;

  always_comb begin
    p = '0;
    g = '0;
    p[W-1:0] = a ^ b;
    g[W-1:0] = a & b;
  end

  cla_lcu #(.W(WP)) u_lcu (
    .p   (p),
    .g   (g),
    .cin (cin),
    .c   (c),
    .gp  (gp),
    .gg  (gg)
  );

  always_comb begin
    sum  = p[W-1:0] ^ c[W-1:0];
    cout = (W == WP) ? (gg | (gp & cin)) : c[W];
  end
endmodule
