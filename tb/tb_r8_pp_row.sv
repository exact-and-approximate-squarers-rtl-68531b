// Testbench of r8_pp_row at W = 15 (row P_0 of a 16-bit squarer).
//
// For every digit code and random B_i the row must hold, as a W-bit two's
// complement number with its sign bit inverted, the value
// digit * (B_i + a[3i+2]) + C_i4, computed here with integers. A second row with
// APPROX_BITS = 6 gets AR8E1 digits on its approximate select: its six low bits
// must come from the approximate product and the rest from the exact one.
module tb_r8_pp_row;
  import r8sq_pkg::*;

  localparam int W = 15;
  localparam int AB = 6;
  localparam int AR8E1_TAB [16] = '{0, 1, 1, 2, 2, 2, 4, 4, -4, -4, -2, -2, -2, -1, -1, 0};

  int checks = 0, failures = 0;
  logic [W-3:0] b;
  booth_sel_t se, sa;
  logic c4;
  logic [W-1:0] pp, ppa, exp_e, exp_a, expm;

  r8_pp_row #(.W(W))                   dut  (.b(b), .sel_exact(se), .sel_approx(se), .c4(c4), .pp(pp));
  r8_pp_row #(.W(W), .APPROX_BITS(AB)) duta (.b(b), .sel_exact(se), .sel_approx(sa), .c4(c4), .pp(ppa));

  function automatic booth_sel_t sel_of(input int d);
    booth_sel_t s;
    int m;
    m = (d < 0) ? -d : d;
    s.m1 = (m == 1);
    s.m2 = (m == 2);
    s.m3 = (m == 3);
    s.m4 = (m == 4);
    s.neg = (d < 0);
    return s;
  endfunction

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d, da, sgn;
    longint bv, ve, va;
    for (int it = 0; it < 3000; it++) begin
      for (int v = 0; v < 16; v++) begin
        d   = -4 * v[3] + 2 * v[2] + v[1] + v[0];
        da  = AR8E1_TAB[v];
        sgn = int'(v[3]);
        b   = (it < 4) ? {(W-2){it[0]}} ^ {it[1], {(W-3){1'b0}}} : (W-2)'($urandom);
        se  = sel_of(d);
        sa  = sel_of(da);
        c4  = (d == 4 || d == -4);
        #1;
        bv = longint'($signed(b));
        ve = longint'(d) * (bv + longint'(sgn)) + longint'(c4);
        va = longint'(da) * (bv + longint'(sgn)) + longint'(c4);
        exp_e = W'(ve) ^ (W'(1) << (W - 1));
        exp_a = W'(va) ^ (W'(1) << (W - 1));
        expm  = (exp_e & ~W'((1 << AB) - 1)) | (exp_a & W'((1 << AB) - 1));
        checks += 2;
        if (pp != exp_e) begin
          failures++;
          if (failures < 10) $display("FAIL code %b b=%0d pp=%h exp=%h", 4'(v), bv, pp, exp_e);
        end
        if (ppa != expm) begin
          failures++;
          if (failures < 10) $display("FAIL approx code %b b=%0d pp=%h exp=%h", 4'(v), bv, ppa, expm);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
