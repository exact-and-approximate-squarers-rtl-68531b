// Reference model of the Radix-8 Booth-folding squarers for the testbenches.
//
// Works on integers, not on the gate structure: digits from the group bits, the
// approximate digits from the recoding tables, each folded row as the product
// digit * (B_i + a[3i+2]) in two's complement with a negative-weight sign bit,
// and the approximate compressors by their effect on the number of ones in a
// column (output count = ones - 1, except 2 for four ones in a 4-2 compressor).
package r8sq_ref_pkg;

  // Approximate digit tables indexed by {a[3i+2], a[3i+1], a[3i], a[3i-1]}.
  localparam int AR8E1_TAB [16] = '{0, 1, 1, 2, 2, 2, 4, 4, -4, -4, -2, -2, -2, -1, -1, 0};
  localparam int AR8E2_TAB [16] = '{0, 1, 1, 2, 2, 2, 2, 2, -2, -2, -2, -2, -2, -1, -1, 0};

  function automatic int digit_of(input int code);
    int d;
    d = -4 * ((code >> 3) & 1) + 2 * ((code >> 2) & 1) + ((code >> 1) & 1) + (code & 1);
    return d;
  endfunction

  // enc: 0 exact, 1 AR8E1, 2 AR8E2. acomp: approximate compression of columns < n,
  // truncation below trunc and a compensating one at column n.
  function automatic longint unsigned ref_square(input longint a_in, input int n,
                                                 input int enc, input bit acomp,
                                                 input int trunc);
    int g, ne, w, col, code, h, stage, k4, cnt, more;
    bit abit [0:99];
    int dig [0:15];
    int adg [0:15];
    longint bval, pe, pa, rep_e, rep_a, cval;
    longint unsigned total, mask;
    bit colbits [0:63][0:31];
    int colh [0:63];
    bit nb [0:31];
    int nh;
    bit bt;

    g  = (n + 2) / 3;
    ne = 3 * g;
    abit[0] = 1'b0;
    for (int k = 0; k < ne; k++) abit[k+1] = (k < n) ? a_in[k] : a_in[n-1];
    for (int i = 0; i < g; i++) begin
      code   = int'({abit[3*i+3], abit[3*i+2], abit[3*i+1], abit[3*i]});
      dig[i] = digit_of(code);
      adg[i] = (enc == 1) ? AR8E1_TAB[code] : (enc == 2) ? AR8E2_TAB[code] : dig[i];
    end
    for (int c = 0; c < 64; c++) colh[c] = 0;
    total = 0;

    // folded rows
    for (int i = 0; i <= g - 2; i++) begin
      w    = n - 3 * i - 1;
      bval = 0;
      for (int k = n - 1; k >= 3 * i + 3; k--) bval = bval * 2 + longint'(abit[k+1]);
      if (abit[n]) bval = bval - (longint'(1) << (n - 3 * i - 3));   // signed B_i
      bval = bval + longint'(abit[3*i+3]);                             // + a[3i+2]
      pe = longint'(dig[i]) * bval;
      pa = longint'(adg[i]) * bval;
      cval = (dig[i] == 4 || dig[i] == -4) ? 1 : 0;                    // C_i4 folded in
      rep_e = pe + cval;
      rep_a = pa + cval;
      for (int j = 0; j < w; j++) begin
        col = 6 * i + 4 + j;
        bt  = (enc != 0 && col < n) ? rep_a[j] : rep_e[j];
        if (acomp && col < n) begin
          if (col >= trunc) begin colbits[col][colh[col]] = bt; colh[col]++; end
        end else if (bt) begin
          if (j == w - 1) total = total - (64'd1 << col);
          else            total = total + (64'd1 << col);
        end
      end
    end

    // square terms
    for (int i = 0; i < g; i++) begin
      cval = longint'(dig[i] * dig[i]);
      for (int k = 0; k < 5; k++) begin
        if (k == 4 && i != g - 1) continue;
        col = 6 * i + k;
        bt  = cval[k];
        if (col >= 2 * n) continue;
        if (acomp && col < n) begin
          if (col >= trunc) begin colbits[col][colh[col]] = bt; colh[col]++; end
        end else if (bt) total = total + (64'd1 << col);
      end
    end

    // approximate compression, column by column, counts of ones only
    if (acomp) begin
      stage = 0;
      do begin
        more = 0;
        for (int c = 0; c < n; c++) begin
          h = colh[c];
          if (h >= 2) begin
            cnt = 0;
            for (int s = 0; s < ((h >= 4) ? 4 : h); s++) cnt += colbits[c][s];
            if (h == 2)      cnt = (cnt > 0) ? cnt - 1 : 0;
            else if (h == 3) cnt = (cnt > 0) ? cnt - 1 : 0;
            else             cnt = (cnt == 4) ? 2 : (cnt > 0) ? cnt - 1 : 0;
            nh = (h == 2) ? 1 : 2;
            nb[0] = (cnt >= 1);
            nb[1] = (cnt >= 2);
            for (int s = 4; s < h; s++) begin nb[nh] = colbits[c][s]; nh++; end
            for (int s = 0; s < nh; s++) colbits[c][s] = nb[s];
            colh[c] = nh;
          end
        end
        stage++;
        for (int c = 0; c < n; c++) if (colh[c] > 2) more = 1;
      end while (more != 0);
      for (int c = 0; c < n; c++)
        for (int s = 0; s < colh[c]; s++)
          if (colbits[c][s]) total = total + (64'd1 << c);
      total = total + (64'd1 << n);
    end

    mask = (n >= 32) ? 64'hFFFF_FFFF_FFFF_FFFF : ((64'd1 << (2 * n)) - 1);
    return total & mask;
  endfunction

endpackage
