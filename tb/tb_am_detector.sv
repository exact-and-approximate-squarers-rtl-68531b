// Square-law AM detector run on the four squarers of r8_squarer_top (N = 16).
//
// An AM signal x[n] = A (1 + m[n]) cos(2 pi fc n / fs), m[n] = M cos(2 pi fm n / fs),
// is sampled at fs = 20 kHz and quantised to 16-bit two's complement with 14
// fraction bits. Every sample is squared by the exact squarer and by R8AS1, R8AS2
// and R8AS3. The rest of the detector is modelled here in real arithmetic: a
// 20-tap moving average as the low-pass filter (it has a zero at 2 fc for both
// carriers), a square root, and removal of the mean. The two signal sets are the
// published ones: fc = 1 kHz, A = 1, fm = 50 Hz, M = 0.5, and fc = 1.5 kHz,
// A = 1, fm = 200 Hz, M = 0.25. The filter, the sample format and the SNR
// reference are this testbench's own choices, since no filter coefficients or
// word lengths are published.
//
// Two SNRs are measured for each demodulated waveform. The first is taken
// against the same detector computed on unquantised samples with an ideal
// square, so it isolates the squarer's error. The second is taken against the
// message itself, so filter distortion counts too; this is the kind of figure
// published (close to 30 dB). Checks: every exact square equals x*x; the exact
// squarer is above 60 dB against the ideal detector (only input quantisation is
// left) and above 20 dB against the message; every approximate squarer is above
// 25 dB against the ideal detector and within 1 dB of the exact squarer against
// the message; R8AS3 raises the squared signal on average (the compensating one
// outweighs the compressor losses, the upward shift seen in the published
// waveforms). Time only orders the samples: one sample per 1 ns step, no clock.
module tb_am_detector;

  localparam int    N      = 16;
  localparam int    NS     = 2020;      // samples per run
  localparam int    TAPS   = 20;        // moving-average length (1 ms)
  localparam int    SKIP   = 20;        // filter warm-up
  localparam real   FS     = 20000.0;
  localparam real   QSCALE = 16384.0;   // 14 fraction bits
  localparam real   PI     = 3.14159265358979;

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
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // squared samples: index 0 = ideal (real), 1 = exact, 2..4 = R8AS1..3
  real sq [5][NS];
  real dm [5][NS];

  // moving average, square root and mean removal over samples SKIP .. NS-1
  task automatic demodulate(input int k);
    real acc, mean;
    for (int n = 0; n < NS; n++) begin
      acc = 0.0;
      for (int t = 0; t < TAPS; t++) acc += (n - t >= 0) ? sq[k][n - t] : 0.0;
      acc = acc / TAPS;
      dm[k][n] = (acc > 0.0) ? $sqrt(acc) : 0.0;
    end
    mean = 0.0;
    for (int n = SKIP; n < NS; n++) mean += dm[k][n];
    mean = mean / (NS - SKIP);
    for (int n = SKIP; n < NS; n++) dm[k][n] -= mean;
  endtask

  function automatic real snr_db(input int k);
    real ps, pe;
    ps = 0.0; pe = 0.0;
    for (int n = SKIP; n < NS; n++) begin
      ps += dm[0][n] * dm[0][n];
      pe += (dm[k][n] - dm[0][n]) * (dm[k][n] - dm[0][n]);
    end
    if (pe == 0.0) return 200.0;
    return 10.0 * $log10(ps / pe);
  endfunction

  // SNR against the message itself: the best-fitting multiple of
  // cos(2 pi fm (n - D) / fs), D = (TAPS-1)/2 being the filter delay, is the
  // signal and the rest is noise (filter ripple, distortion and squarer error).
  function automatic real msg_snr_db(input int k, input real fm);
    real r, rr, rd, ps, pe, g;
    rr = 0.0; rd = 0.0;
    for (int n = SKIP; n < NS; n++) begin
      r = $cos(2.0 * PI * fm * (n - (TAPS - 1) / 2.0) / FS);
      rr += r * r;
      rd += r * dm[k][n];
    end
    g = rd / rr;
    ps = 0.0; pe = 0.0;
    for (int n = SKIP; n < NS; n++) begin
      r = g * $cos(2.0 * PI * fm * (n - (TAPS - 1) / 2.0) / FS);
      ps += r * r;
      pe += (dm[k][n] - r) * (dm[k][n] - r);
    end
    return 10.0 * $log10(ps / pe);
  endfunction

  task automatic run(input real fc, input real amp, input real fm, input real mi);
    real    x, snr, bias, msnr, msnr_exact;
    longint q, s;
    string  names [5];
    names = '{"ideal", "exact", "R8AS1", "R8AS2", "R8AS3"};
    for (int n = 0; n < NS; n++) begin
      x = amp * (1.0 + mi * $cos(2.0 * PI * fm * n / FS)) * $cos(2.0 * PI * fc * n / FS);
      q = longint'($rtoi(x * QSCALE + ((x >= 0.0) ? 0.5 : -0.5)));
      a = N'(q);
      #1;
      s = longint'($signed(a));
      check(sq_exact == (2*N)'(s * s), $sformatf("exact square of %0d", s));
      sq[0][n] = x * x;
      sq[1][n] = real'(longint'($signed(sq_exact))) / (QSCALE * QSCALE);
      sq[2][n] = real'(longint'($signed(sq_r8as1))) / (QSCALE * QSCALE);
      sq[3][n] = real'(longint'($signed(sq_r8as2))) / (QSCALE * QSCALE);
      sq[4][n] = real'(longint'($signed(sq_r8as3))) / (QSCALE * QSCALE);
    end
    for (int k = 0; k < 5; k++) demodulate(k);
    snr        = snr_db(1);
    msnr_exact = msg_snr_db(1, fm);
    $display("fc=%0.0f Hz fm=%0.0f Hz M=%0.2f: exact: SNR %0.1f dB against ideal detector, %0.1f dB against message",
             fc, fm, mi, snr, msnr_exact);
    check(snr > 60.0, "exact squarer SNR");
    check(msnr_exact > 20.0, "detector does not recover the message");
    for (int k = 2; k < 5; k++) begin
      snr  = snr_db(k);
      msnr = msg_snr_db(k, fm);
      bias = 0.0;
      for (int n = 0; n < NS; n++) bias += sq[k][n] - sq[1][n];
      $display("  %s: SNR %0.1f dB against ideal detector, %0.1f dB against message, mean squared-signal error %0.2e",
               names[k], snr, msnr, bias / NS);
      check(snr >= 25.0, $sformatf("%s SNR %0.1f dB", names[k], snr));
      check(msnr > msnr_exact - 1.0, $sformatf("%s loses more than 1 dB against the message", names[k]));
      if (k == 4) check(bias > 0.0, "R8AS3 does not shift the squared signal up");
    end
  endtask

  initial begin
    run(1000.0, 1.0, 50.0, 0.5);
    run(1500.0, 1.0, 200.0, 0.25);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
