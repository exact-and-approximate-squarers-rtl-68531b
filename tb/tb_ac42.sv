// Testbench of ac42: all 16 inputs against the compressor's truth table
// (S1 S2 per input x4 x3 x2 x1) and its error, output count minus input count:
// -1 for every non-zero input, -2 for 1111, 0 for 0000.
module tb_ac42;
  // {S1,S2} for x4x3x2x1 = 0000 .. 1111
  localparam logic [1:0] S [16] = '{2'b00, 2'b00, 2'b00, 2'b10, 2'b00, 2'b01, 2'b01, 2'b11,
                                    2'b00, 2'b01, 2'b01, 2'b11, 2'b10, 2'b11, 2'b11, 2'b11};
  int checks = 0, failures = 0;
  logic [3:0] x;
  logic s1, s2;
  int ed;

  ac42 dut (.x(x), .s1(s1), .s2(s2));

  initial begin : watchdog
    #10us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      x = 4'(v);
      #1;
      ed = int'(s1) + int'(s2) - $countones(x);
      checks += 2;
      if ({s1, s2} != S[v]) begin failures++; $display("FAIL x=%b s=%b%b", x, s1, s2); end
      if (ed != ((v == 0) ? 0 : (v == 15) ? -2 : -1)) begin failures++; $display("FAIL ed x=%b", x); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
