// Testbench of r8as2: every 16-bit operand (the default width) and every 12-bit
// operand; each result is compared with the integer reference model of the
// squarer, and the error against the exact square a*a is gathered into the mean
// error distance normalised by the largest square (NMED). The NMED must lie within
// a factor of two of the published figures for this squarer, 1.130e-05 at 16 bits
// and 2.271e-04 at 12 bits (uniform operands).
module tb_r8as2;
  import r8sq_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [15:0] a16; logic [31:0] s16;
  logic [11:0] a12; logic [23:0] s12;

  r8as2           dut16 (.a(a16), .sq(s16));
  r8as2 #(.N(12)) dut12 (.a(a12), .sq(s12));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint sa, ed;
    real sum16, sum12, nmed16, nmed12;
    int npos, nneg;
    sum16 = 0.0; sum12 = 0.0; npos = 0; nneg = 0;
    for (int v = 0; v < 65536; v++) begin
      a16 = 16'(v);
      #1;
      sa = longint'($signed(a16));
      checks++;
      if (s16 != 32'(ref_square(sa, 16, 2, 1'b0, 6))) begin
        failures++;
        if (failures < 10) $display("FAIL N=16 a=%0d got %0d", sa, s16);
      end
      ed = longint'($signed(s16)) - sa * sa;
      if (ed > 0) npos++;
      if (ed < 0) nneg++;
      sum16 += (ed < 0) ? real'(-ed) : real'(ed);
    end
    for (int v = 0; v < 4096; v++) begin
      a12 = 12'(v);
      #1;
      sa = longint'($signed(a12));
      checks++;
      if (s12 != 24'(ref_square(sa, 12, 2, 1'b0, 6))) begin
        failures++;
        if (failures < 10) $display("FAIL N=12 a=%0d got %0d", sa, s12);
      end
      ed = longint'($signed(s12)) - sa * sa;
      sum12 += (ed < 0) ? real'(-ed) : real'(ed);
    end
    nmed16 = sum16 / 65536.0 / real'(64'd1 << 30);
    nmed12 = sum12 / 4096.0 / real'(64'd1 << 22);
    $display("r8as2 NMED N=16 %e  N=12 %e  (errors: %0d positive, %0d negative at N=16)",
             nmed16, nmed12, npos, nneg);
    checks++;
    if (!(nmed16 > 5.6500e-06 && nmed16 < 2.2600e-05 && nmed12 > 1.1355e-04 && nmed12 < 4.5420e-04)) begin
      failures++;
      $display("FAIL NMED out of range");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
