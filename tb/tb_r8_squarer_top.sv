// End-to-end testbench of r8_squarer_top at its default width (N = 16).
//
// Every 16-bit operand is applied once. The exact output must equal a*a; the three
// approximate outputs must equal the integer reference model of R8AS1, R8AS2 and
// R8AS3. It also counts how often each approximation mechanism is exercised and
// fails if one never is: a magnitude-3 digit recoded up or down by AR8E1, a
// magnitude-4 digit recoded by AR8E2, R8AS1 errors of both signs (the recoding
// errors that cancel each other), R8AS3 results above the exact square (the
// compensating one outweighing the compressor losses) and below it, and the
// extreme operands (most negative, -1, 0).
module tb_r8_squarer_top;
  import r8sq_ref_pkg::*;

  localparam int N = 16;

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

  initial begin
    longint sa, e;
    int code, d, g;
    int n_up3, n_down3, n_four, n_pos1, n_neg1, n_pos3, n_neg3, n_ext;
    n_up3 = 0; n_down3 = 0; n_four = 0; n_pos1 = 0; n_neg1 = 0; n_pos3 = 0; n_neg3 = 0; n_ext = 0;
    g = (N + 2) / 3;
    for (int v = 0; v < (1 << N); v++) begin
      a = N'(v);
      #1;
      sa = longint'($signed(a));
      check(sq_exact == (2*N)'(sa * sa), $sformatf("exact a=%0d got %0d", sa, sq_exact));
      check(sq_r8as1 == (2*N)'(ref_square(sa, N, 1, 1'b0, 6)), $sformatf("R8AS1 a=%0d", sa));
      check(sq_r8as2 == (2*N)'(ref_square(sa, N, 2, 1'b0, 6)), $sformatf("R8AS2 a=%0d", sa));
      check(sq_r8as3 == (2*N)'(ref_square(sa, N, 2, 1'b1, 6)), $sformatf("R8AS3 a=%0d", sa));
      // mechanisms, from the digits of the low rows (groups 0 .. G-2)
      for (int i = 0; i <= g - 2; i++) begin
        code = (i == 0) ? int'({v[2:0], 1'b0}) : ((v >> (3 * i - 1)) & 15);
        d = digit_of(code);
        if (d == 3 || d == -3) begin
          if (AR8E1_TAB[code] == 4 || AR8E1_TAB[code] == -4) n_up3++;
          else n_down3++;
        end
        if (d == 4 || d == -4) n_four++;
      end
      e = longint'($signed(sq_r8as1)) - sa * sa;
      if (e > 0) n_pos1++;
      if (e < 0) n_neg1++;
      e = longint'($signed(sq_r8as3)) - sa * sa;
      if (e > 0) n_pos3++;
      if (e < 0) n_neg3++;
      if (sa == -(longint'(1) << (N - 1)) || sa == -1 || sa == 0) n_ext++;
    end
    $display("AR8E1 +-3 rounded up %0d, down %0d; +-4 digits %0d", n_up3, n_down3, n_four);
    $display("R8AS1 errors +%0d / -%0d; R8AS3 errors +%0d / -%0d; extreme operands %0d",
             n_pos1, n_neg1, n_pos3, n_neg3, n_ext);
    check(n_up3 > 0,   "no magnitude-3 digit recoded up");
    check(n_down3 > 0, "no magnitude-3 digit recoded down");
    check(n_four > 0,  "no magnitude-4 digit");
    check(n_pos1 > 0 && n_neg1 > 0, "R8AS1 errors of one sign only");
    check(n_pos3 > 0 && n_neg3 > 0, "R8AS3 errors of one sign only");
    check(n_ext == 3,  "extreme operands missed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
