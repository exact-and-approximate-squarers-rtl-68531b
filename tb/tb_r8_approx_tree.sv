// Testbench of r8_approx_tree at N = 16 (16 approximate columns, six truncated)
// and at N = 32 (the 32-column tree with two stages).
//
// Random bits are placed in the occupied slots of every column. The expected
// number of ones left in each column is worked out from the compressors'
// errors alone: a 2-1, 3-2 or 4-2 compressor returns one fewer one than it
// receives (none for no ones), a 4-2 compressor with four ones returns two; the
// lowest four slots feed a 4-2 compressor and the two outputs lead the next stage.
// Every stage compresses every column of two or more bits; N = 16 needs one
// stage and N = 32 two, as the column heights of the folded matrix give.
module tb_r8_approx_tree;
  import r8sq_pkg::*;

  int checks = 0, failures = 0;

  logic [15:0][MAXH-1:0] c16; logic [15:0] r16a, r16b;
  logic [31:0][MAXH-1:0] c32; logic [31:0] r32a, r32b;

  r8_approx_tree                               dut16 (.cols(c16), .row0(r16a), .row1(r16b));
  r8_approx_tree #(.N(32), .AW(32), .TRUNC(6)) dut32 (.cols(c32), .row0(r32a), .row1(r32b));

  // Expected count of ones after compression of one column (bits in slots 0..h-1).
  function automatic int expect_ones(input logic [MAXH-1:0] bits, input int h, input int ns);
    int cnt, tail, hh, k;
    logic [MAXH-1:0] cur;
    cur = bits;
    hh  = h;
    for (int st = 0; st < ns; st++) begin
      if (hh == 2 || hh == 3) begin
        cnt = $countones(cur & MAXH'((1 << hh) - 1));
        k   = (cnt > 0) ? cnt - 1 : 0;
        hh  = (hh == 2) ? 1 : 2;
        cur = MAXH'((1 << k) - 1);
      end else if (hh >= 4) begin
        cnt = $countones(cur & MAXH'(15));
        k   = (cnt == 4) ? 2 : (cnt > 0) ? cnt - 1 : 0;
        tail = int'(cur) >> 4;
        cur = MAXH'((1 << k) - 1) | MAXH'(tail << 2);
        hh  = hh - 2;
      end
    end
    return $countones(cur);
  endfunction

  task automatic run16(input int it);
    int h;
    for (int c = 0; c < 16; c++) begin
      h = col_height(16, c, 6);
      c16[c] = (it == 0) ? MAXH'((1 << h) - 1) : MAXH'($urandom) & MAXH'((1 << h) - 1);
    end
    #1;
    for (int c = 0; c < 16; c++) begin
      checks++;
      if (int'(r16a[c]) + int'(r16b[c]) != expect_ones(c16[c], col_height(16, c, 6), 1)) begin
        failures++;
        if (failures < 10) $display("FAIL N=16 column %0d", c);
      end
    end
  endtask

  task automatic run32(input int it);
    int h;
    for (int c = 0; c < 32; c++) begin
      h = col_height(32, c, 6);
      c32[c] = (it == 0) ? MAXH'((1 << h) - 1) : MAXH'($urandom) & MAXH'((1 << h) - 1);
    end
    #1;
    for (int c = 0; c < 32; c++) begin
      checks++;
      if (int'(r32a[c]) + int'(r32b[c]) != expect_ones(c32[c], col_height(32, c, 6), 2)) begin
        failures++;
        if (failures < 10) $display("FAIL N=32 column %0d", c);
      end
    end
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // the 32-column tree needs two stages, the 16-column one a single stage
    checks += 2;
    if (num_stages(32, 32, 6) != 2) begin failures++; $display("FAIL stages N=32"); end
    if (num_stages(16, 16, 6) != 1) begin failures++; $display("FAIL stages N=16"); end
    for (int it = 0; it < 3000; it++) begin
      run16(it);
      run32(it);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
