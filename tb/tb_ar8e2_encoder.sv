// Testbench of ar8e2_encoder: all 16 group codes against the AR8E2 recoding table (+-3 and +-4 to +-2),
// written out here as digit values. Checks that the selects are one-hot (or all
// zero for a zero digit), that they encode the digit magnitude and that the
// negate flag marks exactly the negative digits.
module tb_ar8e2_encoder;
  import r8sq_pkg::*;

  localparam int DIGIT [16] = '{0, 1, 1, 2, 2, 2, 2, 2, -2, -2, -2, -2, -2, -1, -1, 0};

  int checks = 0, failures = 0;
  logic [3:0] q;
  booth_sel_t sel;
  int mag;

  ar8e2_encoder dut (.q(q), .sel(sel));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

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
      mag = 4 * sel.m4 + 3 * sel.m3 + 2 * sel.m2 + sel.m1;
      check($countones({sel.m4, sel.m3, sel.m2, sel.m1}) == ((DIGIT[v] == 0) ? 0 : 1),
            $sformatf("code %b not one-hot", q));
      check(mag == ((DIGIT[v] < 0) ? -DIGIT[v] : DIGIT[v]), $sformatf("code %b magnitude %0d", q, mag));
      check(sel.neg == (DIGIT[v] < 0), $sformatf("code %b neg %b", q, sel.neg));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
