// Testbench of cla_adder: random and carry-chain corner operands at the default
// 32 bits and at 24 and 64 bits; sum and carry out against the simulator's adder.
module tb_cla_adder;
  int checks = 0, failures = 0;

  logic [31:0] a32, b32, s32; logic ci32, co32;
  logic [23:0] a24, b24, s24; logic ci24, co24;
  logic [63:0] a64, b64, s64; logic ci64, co64;

  cla_adder            dut32 (.a(a32), .b(b32), .cin(ci32), .sum(s32), .cout(co32));
  cla_adder #(.W(24))  dut24 (.a(a24), .b(b24), .cin(ci24), .sum(s24), .cout(co24));
  cla_adder #(.W(64))  dut64 (.a(a64), .b(b64), .cin(ci64), .sum(s64), .cout(co64));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [32:0] e32;
    logic [24:0] e24;
    logic [64:0] e64;
    for (int it = 0; it < 20000; it++) begin
      if (it < 4) begin
        // all-propagate operands: a carry in must ripple through every lookahead level
        a32 = '1; b32 = '0; a24 = '1; b24 = '0; a64 = '1; b64 = '0;
        ci32 = it[0]; ci24 = it[0]; ci64 = it[0];
        if (it[1]) begin b32 = 1; b24 = 1; b64 = 1; end
      end else begin
        a32 = $urandom; b32 = $urandom; ci32 = 1'($urandom);
        a24 = 24'($urandom); b24 = 24'($urandom); ci24 = 1'($urandom);
        a64 = {$urandom, $urandom}; b64 = {$urandom, $urandom}; ci64 = 1'($urandom);
      end
      #1;
      e32 = 33'(a32) + 33'(b32) + 33'(ci32);
      e24 = 25'(a24) + 25'(b24) + 25'(ci24);
      e64 = 65'(a64) + 65'(b64) + 65'(ci64);
      checks += 3;
      if ({co32, s32} != e32) begin failures++; if (failures < 10) $display("FAIL 32 %h+%h", a32, b32); end
      if ({co24, s24} != e24) begin failures++; if (failures < 10) $display("FAIL 24 %h+%h", a24, b24); end
      if ({co64, s64} != e64) begin failures++; if (failures < 10) $display("FAIL 64 %h+%h", a64, b64); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
