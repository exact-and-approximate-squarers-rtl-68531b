// Radix-8 Booth-folding squarer, exact or approximate.
//
// The operand a (N-bit two's complement) is recoded into G = ceil(N/3) Radix-8
// digits A_i. Because both factors of a square are the same number, the product
// array folds: A^2 = sum_i C_i 2^(6i) + sum_{i<=G-2} P_i 2^(6i+4), with the square
// terms C_i = A_i^2 (from r8_square_term) and one cross row per digit,
// P_i = A_i * (B_i + a[3i+2]), B_i = signed a[N-1:3i+3] (from r8_pp_row). That is
// G square terms and G-1 rows instead of the ~N/3 full-width rows of a Radix-8
// multiplier. Each row's sign bit is inverted and one constant,
// -sum 2^(N+3i+2) mod 2^(2N), is added in place of sign extension.
// The rows are reduced exactly by a carry-save tree (csa_tree) and added by a
// recursive carry-lookahead adder (cla_adder).
//
// Configuration:
//   ENC   = ENC_EXACT  exact squarer;
//           ENC_AR8E1 / ENC_AR8E2  row bits in columns below N use the approximate
//           encoder (R8AS1 / R8AS2); the C_i terms and all higher bits stay exact.
//   ACOMP = 1  (R8AS3, with ENC_AR8E2) the bits in columns below N are instead
//           compressed by the carry-free approximate compressors (r8_approx_tree),
//           the bits of columns below TRUNC are dropped, and a compensating one is
//           added at column N.
// The folding, the digit and square-term logic, the approximate encoders and
// compressors and their placement follow the published scheme; the exact
// reduction tree, the handling of N not divisible by 3 and the column order
// inside the approximate tree are this design's own choices.
// Output: 2N-bit square (nonnegative, at most 2^(2N-2) for the exact squarer).
// Purely combinational, no clock.
module r8_booth_squarer
  import r8sq_pkg::*;
#(
  parameter int        N     = 16,
  parameter enc_mode_e ENC   = ENC_EXACT,
  parameter bit        ACOMP = 1'b0,
  parameter int        TRUNC = 6
) (
  input  logic [N-1:0]   a,
  output logic [2*N-1:0] sq
);
  localparam int G   = num_groups(N);
  localparam int NE  = 3 * G;                 // operand width after sign extension
  localparam int AW  = ACOMP ? N : 0;         // approximately compressed columns
  localparam int AWX = (AW > 0) ? AW : 1;
  localparam int TR  = ACOMP ? TRUNC : 0;
  localparam int NR  = (G - 1) + 2 + (ACOMP ? 2 : 0);  // P rows, C row, constant, 2 approx rows

  // a[-1] = 0 at index 0, a[k] at index k+1, sign-extended to NE bits
  logic [NE:0] ax;
  assign ax = {{(NE - N){a[N-1]}}, a, 1'b0};

  booth_sel_t sel_e [G];
  booth_sel_t sel_a [G];
  logic [4:0] csq   [G];
  logic [N-1:0] pp_all [G-1];

  for (genvar i = 0; i < G; i++) begin : g_grp
    logic [3:0] q;
    assign q = ax[3*i +: 4];

    r8_booth_encoder u_enc (.q(q), .sel(sel_e[i]));
    r8_square_term   u_sqt (.q(q), .c(csq[i]));

    if (ENC == ENC_AR8E1) begin : g_ar8e1
      ar8e1_encoder u_aenc (.q(q), .sel(sel_a[i]));
    end else if (ENC == ENC_AR8E2) begin : g_ar8e2
      ar8e2_encoder u_aenc (.q(q), .sel(sel_a[i]));
    end else begin : g_exact
      assign sel_a[i] = sel_e[i];
    end

    if (i <= G - 2) begin : g_row
      localparam int W  = row_width(N, i);
      localparam int LO = 6 * i + 4;                       // column of bit 0
      localparam int AB = (ENC == ENC_EXACT) ? 0 :
                          (N - LO <= 0) ? 0 : (N - LO >= W) ? W : N - LO;
      logic [W-1:0] pp;
      r8_pp_row #(.W(W), .APPROX_BITS(AB)) u_row (
        .b          (a[N-1:3*i+3]),
        .sel_exact  (sel_e[i]),
        .sel_approx (sel_a[i]),
        .c4         (csq[i][4]),
        .pp         (pp)
      );
      if (W < N) begin : g_pad
        assign pp_all[i] = {{(N - W){1'b0}}, pp};
      end else begin : g_full
        assign pp_all[i] = pp;
      end
    end
  end

  // Place every bit of the matrix either in the approximate columns (stacked per
  // column) or in the exact rows.
  logic [AWX-1:0][MAXH-1:0] acol;
  logic [2*N-1:0]           prow [G-1];
  logic [2*N-1:0]           crow;
  logic [2*N-1:0]           krow;

  always_comb begin
    int c;
    acol = '0;
    crow = '0;
    for (int i = 0; i < G - 1; i++) begin
      prow[i] = '0;
      for (int j = 0; j < row_width(N, i); j++) begin
        c = 6 * i + 4 + j;
        if (c < AW) begin
          if (c >= TR) acol[c][p_slot(N, i, c)] = pp_all[i][j];
        end else if (c < 2 * N) begin
          prow[i][c] = pp_all[i][j];
        end
      end
    end
    for (int i = 0; i < G; i++) begin
      for (int k = 0; k < 5; k++) begin
        c = 6 * i + k;
        if (c_in_col(N, i, c) && c < 2 * N) begin
          if (c < AW) begin
            if (c >= TR) acol[c][col_height(N, c, TR) - 1] = csq[i][k];
          end else begin
            crow[c] = csq[i][k];
          end
        end
      end
    end
    for (int k = 0; k < 2 * N; k++) krow[k] = sign_const_bit(N, k);
    if (ACOMP) krow = krow + ((2 * N)'(1) << AW);
  end

  logic [NR-1:0][2*N-1:0] rows;
  logic [2*N-1:0]         sum_row, carry_row;
  logic                   cout_unused;

  if (ACOMP) begin : g_acomp
    logic [AW-1:0] ar0, ar1;
    r8_approx_tree #(.N(N), .AW(AW), .TRUNC(TR)) u_atree (
      .cols (acol[AW-1:0]),
      .row0 (ar0),
      .row1 (ar1)
    );
    assign rows[NR-1] = {{(2*N-AW){1'b0}}, ar0};
    assign rows[NR-2] = {{(2*N-AW){1'b0}}, ar1};
  end

  for (genvar i = 0; i < G - 1; i++) begin : g_prow
    assign rows[i] = prow[i];
  end
  assign rows[G-1] = crow;
  assign rows[G]   = krow;

  csa_tree #(.W(2 * N), .NR(NR)) u_csa (
    .rows      (rows),
    .sum_row   (sum_row),
    .carry_row (carry_row)
  );

  cla_adder #(.W(2 * N)) u_cla (
    .a    (sum_row),
    .b    (carry_row),
    .cin  (1'b0),
    .sum  (sq),
    .cout (cout_unused)
  );
endmodule
