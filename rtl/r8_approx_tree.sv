// Approximate compression of the low columns of the R8AS3 squarer.
//
// Input: for each of the AW low columns, the partial-product bits stacked from
// slot 0 up (folded rows P_i in increasing i, then the square-term bit), with
// col_height() bits per column and zeros above. Columns below TRUNC are empty.
// Each stage compresses every column on its own, with no carry into the next:
// two bits with AC_21, three with AC_32, four or more with AC_42 on the lowest four
// slots while the rest move down behind the two compressor outputs. Stages repeat
// (at least one) until no column holds more than two bits; the two remaining slots
// form the output rows. Every compressor drops about one unit of its column's
// weight, and the squarer adds a single one at column AW to offset the sum of
// these losses. Column heights and the stage count follow from N alone.
// Combinational.
module r8_approx_tree
  import r8sq_pkg::*;
#(
  parameter int N     = 16,  // operand width (fixes the partial-product matrix)
  parameter int AW    = 16,  // approximate columns 0..AW-1
  parameter int TRUNC = 6    // columns below TRUNC hold no bits
) (
  input  logic [AW-1:0][MAXH-1:0] cols,
  output logic [AW-1:0]           row0,
  output logic [AW-1:0]           row1
);
  localparam int NS = num_stages(N, AW, TRUNC);

  logic [AW-1:0][MAXH-1:0] st [NS+1];

  assign st[0] = cols;

  for (genvar s = 0; s < NS; s++) begin : g_stage
    for (genvar c = 0; c < AW; c++) begin : g_col
      localparam int H = height_after(N, c, TRUNC, s);
      if (H <= 1) begin : g_pass
        assign st[s+1][c] = {{(MAXH-1){1'b0}}, (H == 1) ? st[s][c][0] : 1'b0};
      end else if (H == 2) begin : g_ac21
        logic sb;
        ac21 u_ac (.x(st[s][c][1:0]), .s(sb));
        assign st[s+1][c] = {{(MAXH-1){1'b0}}, sb};
      end else if (H == 3) begin : g_ac32
        logic sa, sb;
        ac32 u_ac (.x(st[s][c][2:0]), .s1(sa), .s2(sb));
        assign st[s+1][c] = {{(MAXH-2){1'b0}}, sb, sa};
      end else if (H == 4) begin : g_ac42
        logic sa, sb;
        ac42 u_ac (.x(st[s][c][3:0]), .s1(sa), .s2(sb));
        assign st[s+1][c] = {{(MAXH-2){1'b0}}, sb, sa};
      end else begin : g_ac42_pass
        logic sa, sb;
        ac42 u_ac (.x(st[s][c][3:0]), .s1(sa), .s2(sb));
        assign st[s+1][c] = {{(MAXH-H+2){1'b0}}, st[s][c][H-1:4], sb, sa};
      end
    end
  end

  always_comb begin
    for (int c = 0; c < AW; c++) begin
      row0[c] = st[NS][c][0];
      row1[c] = st[NS][c][1];
    end
  end
endmodule
