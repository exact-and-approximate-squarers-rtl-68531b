// Testbench of r8_square_term: for all 16 group codes the output must equal the
// square of the digit -4 a[3i+2] + 2 a[3i+1] + a[3i] + a[3i-1], computed here.
module tb_r8_square_term;
  int checks = 0, failures = 0;
  logic [3:0] q;
  logic [4:0] c;
  int d;

  r8_square_term dut (.q(q), .c(c));

  initial begin : watchdog
    #10us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      q = 4'(v);
      #1;
      d = -4 * v[3] + 2 * v[2] + v[1] + v[0];
      checks++;
      if (int'(c) != d * d) begin
        failures++;
        $display("FAIL code %b: %0d, expected %0d", q, c, d * d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
