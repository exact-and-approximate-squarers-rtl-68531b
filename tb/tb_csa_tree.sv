// Testbench of csa_tree: random rows at the default size (3 rows of 32 bits) and
// at 9 rows of 24 bits and 10 rows of 64 bits; the two output rows must add up,
// modulo 2^W, to the sum of the input rows.
module tb_csa_tree;
  int checks = 0, failures = 0;

  logic [2:0][31:0] r3;  logic [31:0] s3, c3;
  logic [8:0][23:0] r9;  logic [23:0] s9, c9;
  logic [9:0][63:0] r10; logic [63:0] s10, c10;

  csa_tree                    dut3  (.rows(r3),  .sum_row(s3),  .carry_row(c3));
  csa_tree #(.W(24), .NR(9))  dut9  (.rows(r9),  .sum_row(s9),  .carry_row(c9));
  csa_tree #(.W(64), .NR(10)) dut10 (.rows(r10), .sum_row(s10), .carry_row(c10));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] e3;
    logic [23:0] e9;
    logic [63:0] e10;
    for (int it = 0; it < 5000; it++) begin
      for (int k = 0; k < 3; k++)  r3[k]  = (it == 0) ? '1 : $urandom;
      for (int k = 0; k < 9; k++)  r9[k]  = (it == 0) ? '1 : 24'($urandom);
      for (int k = 0; k < 10; k++) r10[k] = (it == 0) ? '1 : {$urandom, $urandom};
      #1;
      e3 = '0; e9 = '0; e10 = '0;
      for (int k = 0; k < 3; k++)  e3  += r3[k];
      for (int k = 0; k < 9; k++)  e9  += r9[k];
      for (int k = 0; k < 10; k++) e10 += r10[k];
      checks += 3;
      if (s3 + c3 != e3)    begin failures++; if (failures < 10) $display("FAIL 3 rows"); end
      if (s9 + c9 != e9)    begin failures++; if (failures < 10) $display("FAIL 9 rows"); end
      if (s10 + c10 != e10) begin failures++; if (failures < 10) $display("FAIL 10 rows"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
