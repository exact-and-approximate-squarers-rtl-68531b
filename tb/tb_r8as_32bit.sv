// 32-bit evaluation of the three approximate squarers (and the exact one).
//
// 200000 uniformly distributed 32-bit operands, plus the extreme ones, are
// squared by the exact squarer and by R8AS1, R8AS2 and R8AS3 at N = 32, where the
// approximate part covers the 32 low columns and R8AS3's tree has two stages.
// The exact result must equal a*a and each approximate one the integer reference
// model. Outputs are read as signed 64-bit numbers: R8AS3 can fall just below zero
// for small operands. The NMED of each approximate squarer (mean |error| over the
// largest square, 2^62) is printed; it must be non-zero, grow from R8AS1 to R8AS2
// to R8AS3, and stay below the published 32-bit figures 2.231e-7, 2.857e-7 and
// 4.441e-7 (the measured values are about three orders of magnitude lower).
module tb_r8as_32bit;
  import r8sq_pkg::*;
  import r8sq_ref_pkg::*;

  localparam int NS = 200000;
  localparam real PUB [3] = '{2.231e-7, 2.857e-7, 4.441e-7};

  int checks = 0, failures = 0;
  logic [31:0] a;
  logic [63:0] se, s1, s2, s3;

  r8_booth_squarer #(.N(32)) u_exact (.a(a), .sq(se));
  r8as1 #(.N(32)) u_1 (.a(a), .sq(s1));
  r8as2 #(.N(32)) u_2 (.a(a), .sq(s2));
  r8as3 #(.N(32)) u_3 (.a(a), .sq(s3));

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
    longint sa;
    longint ex, e;
    real nm [3];
    real sum [3];
    real nmed;
    logic [63:0] got [3];
    for (int k = 0; k < 3; k++) sum[k] = 0.0;
    for (int v = 0; v < NS; v++) begin
      a = (v == 0) ? 32'h8000_0000 : (v == 1) ? 32'h7FFF_FFFF : (v == 2) ? 32'hFFFF_FFFF : $urandom;
      #1;
      sa = longint'($signed(a));
      ex = sa * sa;
      got[0] = s1; got[1] = s2; got[2] = s3;
      check(se == 64'(ex), $sformatf("exact a=%0d", sa));
      check(s1 == ref_square(sa, 32, 1, 1'b0, 6), $sformatf("R8AS1 a=%0d", sa));
      check(s2 == ref_square(sa, 32, 2, 1'b0, 6), $sformatf("R8AS2 a=%0d", sa));
      check(s3 == ref_square(sa, 32, 2, 1'b1, 6), $sformatf("R8AS3 a=%0d", sa));
      for (int k = 0; k < 3; k++) begin
        e = longint'($signed(got[k])) - ex;
        sum[k] += (e < 0) ? real'(-e) : real'(e);
      end
    end
    for (int k = 0; k < 3; k++) begin
      nmed = sum[k] / real'(NS) / (2.0 ** 62);
      nm[k] = nmed;
      $display("R8AS%0d NMED N=32 %e (published %e)", k + 1, nmed, PUB[k]);
      check(nmed > 0.0 && nmed < PUB[k], $sformatf("R8AS%0d NMED out of range", k + 1));
    end
    check(nm[0] < nm[1] && nm[1] < nm[2], "NMED not increasing from R8AS1 to R8AS3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
