// Lookahead carry unit of the recursive carry-lookahead adder.
//
// Takes W bit-level (or group-level) propagate/generate pairs, W a power of four,
// and the carry in. For W = 4 it is the 4-bit lookahead block: carries
// c1 = g0 + p0 cin, c2 = g1 + p1 g0 + p1 p0 cin, and so on, plus the block
// propagate and generate. For larger W it splits into four sub-units of W/4, takes
// their group propagate/generate, and runs the same 4-bit lookahead on those to
// give each sub-unit its carry in. Outputs: the carry into every position and the
// group propagate/generate (these do not depend on cin). Combinational.
module cla_lcu #(
  parameter int W = 4    // power of four, at least 4
) (
  input  logic [W-1:0] p,
  input  logic [W-1:0] g,
  input  logic         cin,
  output logic [W-1:0] c,      // carry into each position
  output logic         gp,     // group propagate
  output logic         gg      // group generate
);
  if (W <= 4) begin : g_leaf
    // 4-bit lookahead block (W is always 4 here)
    always_comb begin
      c[0] = cin;
      c[1] = g[0] | (p[0] & cin);
      c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & cin);
      c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & cin);
      gp   = p[3] & p[2] & p[1] & p[0];
      gg   = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]);
    end
  end else begin : g_node
    localparam int S = W / 4;
    logic [3:0] sp, sg, sc;
    logic       np, ng;

    for (genvar k = 0; k < 4; k++) begin : g_sub
      cla_lcu #(.W(S)) u_sub (
        .p   (p[k*S +: S]),
        .g   (g[k*S +: S]),
        .cin (sc[k]),
        .c   (c[k*S +: S]),
        .gp  (sp[k]),
        .gg  (sg[k])
      );
    end

    cla_lcu #(.W(4)) u_top (
      .p   (sp),
      .g   (sg),
      .cin (cin),
      .c   (sc),
      .gp  (np),
      .gg  (ng)
    );

    assign gp = np;
    assign gg = ng;
  end
endmodule
