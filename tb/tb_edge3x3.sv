// tb_edge3x3: checks the max-difference edge rule on random and hand-made
// windows, at random thresholds and at the boundary (difference equal to the
// threshold gives 0, one more gives the difference).
module tb_edge3x3;
  import dips_pkg::*;
  win3_t      win;
  logic [7:0] threshold, pix;
  int checks = 0, failures = 0;

  edge3x3 dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ad(int a, int b); return a > b ? a - b : b - a; endfunction

  function automatic int expected(int thr);
    int m = 0;
    int d[4];
    d[0] = ad(win[1][0], win[1][2]);
    d[1] = ad(win[0][1], win[2][1]);
    d[2] = ad(win[0][0], win[2][2]);
    d[3] = ad(win[0][2], win[2][0]);
    foreach (d[i]) if (d[i] > m) m = d[i];
    return (m > thr) ? m : 0;
  endfunction

  task automatic check(int exp_v);
    #1;
    checks++;
    if (int'(pix) != exp_v) begin
      failures++;
      if (failures < 10) $display("thr %0d got %0d exp %0d", threshold, pix, exp_v);
    end
  endtask

  initial begin
    for (int t = 0; t < 5000; t++) begin
      for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) win[r][c] = 8'($urandom);
      threshold = 8'($urandom);
      check(expected(int'(threshold)));
    end
    // each pair alone carries a difference of 40
    for (int pr = 0; pr < 4; pr++) begin
      win = '{default: '{default: 8'd100}};
      case (pr)
        0: win[1][0] = 8'd140;
        1: win[2][1] = 8'd60;
        2: win[0][0] = 8'd140;
        default: win[2][0] = 8'd60;
      endcase
      threshold = 8'd40; check(0);
      threshold = 8'd39; check(40);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
