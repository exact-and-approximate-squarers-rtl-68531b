// Exact carry-save reduction of NR rows to two rows.
//
// Rows are taken three at a time into a row of full adders (sum = a^b^c,
// carry = majority shifted one column up); rows left over pass to the next level.
// Each level turns R rows into 2*floor(R/3) + R mod 3, and levels are stacked
// until two rows remain (a row-wise Wallace tree). Carries out of column W-1 are
// dropped: results are modulo 2^W.
// Interface: NR rows in, a sum row and a carry row out, whose sum modulo 2^W equals
// the sum of the inputs. Combinational.
module csa_tree #(
  parameter int W  = 32,
  parameter int NR = 3
) (
  input  logic [NR-1:0][W-1:0] rows,
  output logic [W-1:0]         sum_row,
  output logic [W-1:0]         carry_row
);
  // rows left after l levels
  function automatic int rows_at(input int l);
    int r;
    r = NR;
    for (int k = 0; k < l; k++) r = 2 * (r / 3) + r % 3;
    return r;
  endfunction

  function automatic int num_levels();
    int l;
    l = 0;
    while (rows_at(l) > 2) l++;
    return l;
  endfunction

  localparam int NL = num_levels();

  for (genvar l = 0; l < NL; l++) begin : g_level
    localparam int R  = rows_at(l);
    localparam int NG = R / 3;        // full-adder rows at this level
    localparam int NP = R % 3;        // rows passed through
    logic [NR-1:0][W-1:0] cur, nxt;

    if (l == 0) begin : g_first
      assign cur = rows;
    end else begin : g_chain
      assign cur = g_level[l-1].nxt;
    end

    always_comb begin
      nxt = '0;
      for (int k = 0; k < NG; k++) begin
        nxt[2*k]   = cur[3*k] ^ cur[3*k+1] ^ cur[3*k+2];
        nxt[2*k+1] = ((cur[3*k] & cur[3*k+1]) | (cur[3*k] & cur[3*k+2]) |
                      (cur[3*k+1] & cur[3*k+2])) << 1;
      end
      for (int k = 0; k < NP; k++) nxt[2*NG+k] = cur[3*NG+k];
    end
  end

  if (NL == 0) begin : g_none
    assign sum_row   = rows[0];
    assign carry_row = (NR >= 2) ? rows[NR > 1 ? 1 : 0] : '0;
  end else begin : g_out
    assign sum_row   = g_level[NL-1].nxt[0];
    assign carry_row = g_level[NL-1].nxt[1];
  end
endmodule
