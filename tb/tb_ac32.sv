// Testbench of ac32: all 8 inputs against the truth table (S1 S2 per x3 x2 x1)
// and the error of -1 for every non-zero input.
module tb_ac32;
  localparam logic [1:0] S [8] = '{2'b00, 2'b00, 2'b00, 2'b10, 2'b00, 2'b01, 2'b01, 2'b11};
  int checks = 0, failures = 0;
  logic [2:0] x;
  logic s1, s2;

  ac32 dut (.x(x), .s1(s1), .s2(s2));

  initial begin : watchdog
    #10us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      x = 3'(v);
      #1;
      checks += 2;
      if ({s1, s2} != S[v]) begin failures++; $display("FAIL x=%b s=%b%b", x, s1, s2); end
      if (int'(s1) + int'(s2) - $countones(x) != ((v == 0) ? 0 : -1)) begin
        failures++; $display("FAIL ed x=%b", x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
