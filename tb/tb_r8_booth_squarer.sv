// Testbench of the Radix-8 Booth-folding squarer core in its exact configuration.
//
// Every 16-bit operand (the default width) and every 12- and 13-bit operand is
// applied, and random 32-bit operands; each square is compared with a*a computed
// by the simulator. A second instance per width runs R8AS3 (approximate encoder,
// compressors, truncation, compensation) against the integer reference model.
// A watchdog ends the run with a failure if it does not finish.
module tb_r8_booth_squarer;
  import r8sq_pkg::*;
  import r8sq_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [15:0] a16;  logic [31:0] s16, s16x;
  logic [11:0] a12;  logic [23:0] s12, s12x;
  logic [12:0] a13;  logic [25:0] s13;
  logic [31:0] a32;  logic [63:0] s32, s32x;

  r8_booth_squarer                                         dut16 (.a(a16), .sq(s16));
  r8_booth_squarer #(.N(16), .ENC(ENC_AR8E2), .ACOMP(1'b1)) dut16x (.a(a16), .sq(s16x));
  r8_booth_squarer #(.N(12))                               dut12 (.a(a12), .sq(s12));
  r8_booth_squarer #(.N(12), .ENC(ENC_AR8E2), .ACOMP(1'b1)) dut12x (.a(a12), .sq(s12x));
  r8_booth_squarer #(.N(13))                               dut13 (.a(a13), .sq(s13));
  r8_booth_squarer #(.N(32))                               dut32 (.a(a32), .sq(s32));
  r8_booth_squarer #(.N(32), .ENC(ENC_AR8E2), .ACOMP(1'b1)) dut32x (.a(a32), .sq(s32x));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint sa;
    for (int v = 0; v < 65536; v++) begin
      a16 = 16'(v);
      #1;
      sa = longint'($signed(a16));
      check(s16 == 32'(sa * sa), $sformatf("N=16 a=%0d got %0d", sa, s16));
      check(s16x == 32'(ref_square(sa, 16, 2, 1'b1, 6)), $sformatf("N=16 R8AS3 a=%0d got %0d", sa, s16x));
    end
    for (int v = 0; v < 4096; v++) begin
      a12 = 12'(v);
      #1;
      sa = longint'($signed(a12));
      check(s12 == 24'(sa * sa), $sformatf("N=12 a=%0d got %0d", sa, s12));
      check(s12x == 24'(ref_square(sa, 12, 2, 1'b1, 6)), $sformatf("N=12 R8AS3 a=%0d", sa));
    end
    for (int v = 0; v < 8192; v++) begin
      a13 = 13'(v);
      #1;
      sa = longint'($signed(a13));
      check(s13 == 26'(sa * sa), $sformatf("N=13 a=%0d got %0d", sa, s13));
    end
    for (int v = 0; v < 20000; v++) begin
      a32 = (v < 4) ? {v[1], {31{v[0]}}} : $urandom;
      #1;
      sa = longint'($signed(a32));
      check(s32 == 64'(sa * sa), $sformatf("N=32 a=%0d got %0d", sa, s32));
      check(s32x == ref_square(sa, 32, 2, 1'b1, 6), $sformatf("N=32 R8AS3 a=%0d", sa));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
