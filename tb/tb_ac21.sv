// Testbench of ac21: all 4 inputs against the truth table and the error of -1
// for every non-zero input.
module tb_ac21;
  localparam logic S [4] = '{1'b0, 1'b0, 1'b0, 1'b1};
  int checks = 0, failures = 0;
  logic [1:0] x;
  logic s;

  ac21 dut (.x(x), .s(s));

  initial begin : watchdog
    #10us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      x = 2'(v);
      #1;
      checks += 2;
      if (s != S[v]) begin failures++; $display("FAIL x=%b s=%b", x, s); end
      if (int'(s) - $countones(x) != ((v == 0) ? 0 : -1)) begin failures++; $display("FAIL ed x=%b", x); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
