// k-means clustering with squared Euclidean distances from r8_squarer_top (N = 16).
//
// 600 points are drawn around three centres (200 points each, Gaussian spread
// with sigma = 1) in a plane near (201, 201), matching the published experiment
// in size: 600 random points, three clusters. Lloyd's algorithm runs once per
// squarer: each point goes to the centre with the smallest dx^2 + dy^2, both
// squares taken from the squarer under test, then every centre moves to the
// mean of its points, until no label changes (at most 30 rounds). All four runs
// start from the same three points. The data set is this testbench's own.
//
// No number format is published, so the experiment is run twice. With 11
// fraction bits a coordinate difference of up to +-16 fills the 16-bit operand;
// with 8 fraction bits the differences are small numbers whose squares lie
// mostly in the approximated low columns, which makes the approximation felt.
//
// The labels of the exact run are the reference, as in the published
// comparison. For each approximate squarer the F1-measure F1 = 2PR/(P+R) is
// averaged over the three clusters (published: 0.94, 0.92 and 0.91 for R8AS1,
// R8AS2 and R8AS3). Checks: every exact square equals dx*dx; the exact run
// converges and puts at least 70 % of the points in their generating cluster
// (the clusters overlap); the approximate runs reach F1 >= 0.99 with 11
// fraction bits and F1 >= 0.9 with 8. Time only orders the squarer evaluations
// (1 ns each); there is no clock.
module tb_kmeans;

  localparam int  N     = 16;
  localparam int  NP    = 600;
  localparam int  K     = 3;
  localparam int  MAXIT = 30;
  localparam real PI    = 3.14159265358979;

  int checks = 0, failures = 0;
  logic [N-1:0]   a;
  logic [2*N-1:0] sq_exact, sq_r8as1, sq_r8as2, sq_r8as3;

  r8_squarer_top dut (
    .a        (a),
    .sq_exact (sq_exact),
    .sq_r8as1 (sq_r8as1),
    .sq_r8as2 (sq_r8as2),
    .sq_r8as3 (sq_r8as3)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int PERMS [6][3] = '{'{0, 1, 2}, '{0, 2, 1}, '{1, 0, 2}, '{1, 2, 0}, '{2, 0, 1}, '{2, 1, 0}};

  int px [NP], py [NP], truth [NP];
  int lab [4][NP];
  int n_sat = 0;

  // square of a coordinate difference on squarer `which` (0 exact, 1..3 R8AS1..3)
  task automatic square(input int d, input int which, output longint r);
    longint s;
    if (d > 32767)  begin d = 32767;  n_sat++; end
    if (d < -32768) begin d = -32768; n_sat++; end
    a = N'(d);
    #1;
    s = longint'(d);
    case (which)
      0: begin
        r = longint'($signed(sq_exact));
        check(r == s * s, $sformatf("exact square of %0d", d));
      end
      1: r = longint'($signed(sq_r8as1));
      2: r = longint'($signed(sq_r8as2));
      default: r = longint'($signed(sq_r8as3));
    endcase
  endtask

  real gauss_spare;
  bit  have_spare = 0;
  function automatic real gauss();
    real u1, u2, m;
    if (have_spare) begin
      have_spare = 0;
      return gauss_spare;
    end
    u1 = (real'($urandom % 1000000) + 1.0) / 1000001.0;
    u2 = real'($urandom % 1000000) / 1000000.0;
    m  = $sqrt(-2.0 * $ln(u1));
    gauss_spare = m * $sin(2.0 * PI * u2);
    have_spare  = 1;
    return m * $cos(2.0 * PI * u2);
  endfunction

  task automatic kmeans(input int which, output int rounds, output bit converged);
    int cx [K], cy [K], sx [K], sy [K], cnt [K];
    longint dx2, dy2, d2, best;
    int bi, changed;
    cx[0] = px[0];   cy[0] = py[0];
    cx[1] = px[200]; cy[1] = py[200];
    cx[2] = px[400]; cy[2] = py[400];
    for (int p = 0; p < NP; p++) lab[which][p] = -1;
    converged = 0;
    rounds    = 0;
    while (!converged && rounds < MAXIT) begin
      rounds++;
      changed = 0;
      for (int p = 0; p < NP; p++) begin
        best = 0;
        bi   = 0;
        for (int c = 0; c < K; c++) begin
          square(px[p] - cx[c], which, dx2);
          square(py[p] - cy[c], which, dy2);
          d2 = dx2 + dy2;
          if (c == 0 || d2 < best) begin
            best = d2;
            bi   = c;
          end
        end
        if (lab[which][p] != bi) changed++;
        lab[which][p] = bi;
      end
      converged = (changed == 0);
      for (int c = 0; c < K; c++) begin
        sx[c] = 0; sy[c] = 0; cnt[c] = 0;
      end
      for (int p = 0; p < NP; p++) begin
        sx[lab[which][p]] += px[p];
        sy[lab[which][p]] += py[p];
        cnt[lab[which][p]]++;
      end
      for (int c = 0; c < K; c++)
        if (cnt[c] > 0) begin
          cx[c] = sx[c] / cnt[c];
          cy[c] = sy[c] / cnt[c];
        end
    end
  endtask

  // F1-measure of labels `l` against reference labels `r`, averaged over clusters
  function automatic real f1(input int which, input int ref_which);
    real sum, pr, rc;
    int tp, np_, nr;
    sum = 0.0;
    for (int c = 0; c < K; c++) begin
      tp = 0; np_ = 0; nr = 0;
      for (int p = 0; p < NP; p++) begin
        if (lab[which][p] == c) np_++;
        if (lab[ref_which][p] == c) nr++;
        if (lab[which][p] == c && lab[ref_which][p] == c) tp++;
      end
      pr = (np_ > 0) ? real'(tp) / np_ : 0.0;
      rc = (nr > 0) ? real'(tp) / nr : 0.0;
      sum += (pr + rc > 0.0) ? 2.0 * pr * rc / (pr + rc) : 0.0;
    end
    return sum / K;
  endfunction

  real ctr_x [K] = '{200.5, 202.0, 199.8};
  real ctr_y [K] = '{199.3, 201.8, 201.0};
  real gx [NP], gy [NP];

  // one clustering experiment with `frac` fraction bits per coordinate
  task automatic run_format(input int frac, input real min_f1);
    real   score;
    int    rounds, agree;
    bit    conv;
    string names [4], note;
    names = '{"exact", "R8AS1", "R8AS2", "R8AS3"};
    $display("coordinates with %0d fraction bits:", frac);
    for (int p = 0; p < NP; p++) begin
      px[p] = $rtoi(gx[p] * (1 << frac));
      py[p] = $rtoi(gy[p] * (1 << frac));
    end
    for (int w = 0; w < 4; w++) begin
      kmeans(w, rounds, conv);
      if (w == 0) begin
        // cluster names are arbitrary: take the best of the six matchings
        agree = 0;
        for (int m = 0; m < 6; m++) begin
          int perm [3], hit;
          perm = PERMS[m];
          hit  = 0;
          for (int p = 0; p < NP; p++) hit += (perm[lab[0][p]] == truth[p]) ? 1 : 0;
          if (hit > agree) agree = hit;
        end
        $display("  exact: %0d rounds, %0d of %0d points in their generating cluster", rounds, agree, NP);
        check(conv, "exact run did not converge");
        check(agree >= NP * 7 / 10, "exact run misses the generating clusters");
      end else begin
        score = f1(w, 0);
        note = conv ? "" : " (labels still changing)";
        $display("  %s: %0d rounds%s, F1 = %0.4f against the exact run", names[w], rounds, note, score);
        check(score >= min_f1, $sformatf("%s F1 %0.4f", names[w], score));
      end
    end
  endtask

  initial begin
    void'($urandom(32'd2023));
    for (int p = 0; p < NP; p++) begin
      truth[p] = p / (NP / K);
      gx[p] = ctr_x[truth[p]] + gauss();
      gy[p] = ctr_y[truth[p]] + gauss();
    end
    run_format(11, 0.99);
    run_format(8, 0.9);
    check(n_sat == 0, "coordinate difference out of the 16-bit range");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
