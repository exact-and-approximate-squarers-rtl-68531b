// Shared types and elaboration-time geometry of the Radix-8 Booth-folding squarers.
//
// An N-bit two's complement operand a is cut into G = ceil(N/3) overlapping groups
// q_i = {a[3i+2], a[3i+1], a[3i], a[3i-1]} (a[-1] = 0, sign-extended above a[N-1]).
// Each group gives a digit A_i in -4..4. The square is the sum of the square terms
// C_i = A_i^2 at column 6i and, for i <= G-2, the folded cross terms
// P_i = A_i * (B_i + a[3i+2]) at column 6i+4, where B_i = signed a[N-1:3i+3].
// Row P_i is W_i = N-3i-1 bits wide; its sign bit sits at column N+3i+2.
// The functions below give these positions so that every module derives the same
// partial-product matrix from N alone. The encoder select bundle and the encoder
// choice (exact or one of the two approximate recodings) are also defined here.
package r8sq_pkg;

  // Which Radix-8 encoder drives the low partial-product bits.
  typedef enum logic [1:0] {
    ENC_EXACT = 2'd0,  // Table-1 digits, x1..x4
    ENC_AR8E1 = 2'd1,  // +-3 recoded to +-2 / +-4
    ENC_AR8E2 = 2'd2   // +-3 and +-4 recoded to +-2
  } enc_mode_e;

  // One-hot magnitude select (|A_i| = 4 m4 + 3 m3 + 2 m2 + m1) and negate flag.
  typedef struct packed {
    logic m4;
    logic m3;
    logic m2;
    logic m1;
    logic neg;
  } booth_sel_t;

  // Largest number of bits that can fall in one column (rows P plus one C bit).
  localparam int MAXH = 16;

  function automatic int num_groups(input int n);
    return (n + 2) / 3;
  endfunction

  // Width of folded row P_i.
  function automatic int row_width(input int n, input int i);
    return n - 3 * i - 1;
  endfunction

  // True when row P_i has a bit in column c.
  function automatic bit p_in_col(input int n, input int i, input int c);
    return (c >= 6 * i + 4) && (c <= n + 3 * i + 2);
  endfunction

  // True when the square term C_i has a bit in column c: bits 0..3, and bit 4
  // only for the last group (elsewhere it is folded into P_i0). Bit 1 is always
  // zero but keeps its place in the column, as in the published 32-bit column
  // map; in the approximate columns it is a 0 input to a compressor.
  function automatic bit c_in_col(input int n, input int i, input int c);
    int k;
    k = c - 6 * i;
    if (k >= 0 && k <= 3) return 1'b1;
    if (k == 4 && i == num_groups(n) - 1) return 1'b1;
    return 1'b0;
  endfunction

  // Index of the group whose C term covers column c, or -1.
  function automatic int c_group(input int n, input int c);
    for (int i = 0; i < num_groups(n); i++)
      if (c_in_col(n, i, c)) return i;
    return -1;
  endfunction

  // Stack position of row P_i in column c: the P rows present, in increasing i.
  function automatic int p_slot(input int n, input int i, input int c);
    int s;
    s = 0;
    for (int k = 0; k < i; k++)
      if (p_in_col(n, k, c)) s++;
    return s;
  endfunction

  // Number of partial-product bits in column c (rows P, then C), zero below trunc.
  function automatic int col_height(input int n, input int c, input int trunc);
    int h;
    h = 0;
    if (c < trunc) return 0;
    for (int i = 0; i <= num_groups(n) - 2; i++)
      if (p_in_col(n, i, c)) h++;
    if (c_group(n, c) >= 0) h++;
    return h;
  endfunction

  // Column height after one stage of approximate compression:
  // 2 -> AC_21 (1 bit), 3 -> AC_32 (2 bits), 4 or more -> AC_42 on four (2 bits) + rest.
  function automatic int stage_height(input int h);
    if (h <= 1) return h;
    if (h == 2) return 1;
    if (h == 3) return 2;
    return h - 2;
  endfunction

  // Height of column c after s stages.
  function automatic int height_after(input int n, input int c, input int trunc, input int s);
    int h;
    h = col_height(n, c, trunc);
    for (int k = 0; k < s; k++) h = stage_height(h);
    return h;
  endfunction

  // Stages needed (at least one) until no column of the lowest aw columns holds
  // more than two bits.
  function automatic int num_stages(input int n, input int aw, input int trunc);
    int s;
    bit more;
    s = 1;
    do begin
      more = 1'b0;
      for (int c = 0; c < aw; c++)
        if (height_after(n, c, trunc, s) > 2) more = 1'b1;
      if (more) s++;
    end while (more && s < 32);
    return s;
  endfunction

  // Sign-extension constant: minus the weight of every row's sign bit, modulo 2^(2n).
  // Bit k of the constant (k < 2n).
  function automatic bit sign_const_bit(input int n, input int k);
    logic [127:0] acc;
    acc = '0;
    for (int i = 0; i <= num_groups(n) - 2; i++)
      acc = acc - (128'd1 << (n + 3 * i + 2));
    return acc[k];
  endfunction

endpackage
