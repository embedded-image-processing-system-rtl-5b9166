// tb_dwt53_core: self-checking test of the 5/3 lifting core.
// Random 8-bit and signed lines of several even lengths are transformed
// forward and compared with a reference written directly from the four
// lifting equations (separate X and Y arrays, symmetric extension); the
// result is then transformed back and must equal the original line exactly.
// Every transform must take exactly N clocks from start to done.
module tb_dwt53_core;
  localparam int DW = 16, MAXN = 64, AW = $clog2(MAXN);
  logic clk = 0, rst_n = 0;
  logic we, start, inverse, busy, done;
  logic [AW-1:0] addr;
  logic signed [DW-1:0] wdata, rdata;
  logic [AW:0] len;
  int checks = 0, failures = 0;

  dwt53_core #(.DW(DW), .MAXN(MAXN)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int fl2(int v); return (v >= 0) ? v / 2 : -((-v + 1) / 2); endfunction
  function automatic int fl4(int v); return (v >= 0) ? v / 4 : -((-v + 3) / 4); endfunction

  int x[MAXN], y[MAXN], r[MAXN];

  task automatic ref_fwd(int n);
    for (int k = 1; k < n; k += 2) begin
      automatic int right = (k + 1 < n) ? x[k+1] : x[k-1];
      y[k] = x[k] - fl2(x[k-1] + right);
    end
    for (int k = 0; k < n; k += 2) begin
      automatic int left = (k > 0) ? y[k-1] : y[k+1];
      y[k] = x[k] + fl4(left + y[k+1] + 2);
    end
  endtask

  task automatic load(int n, ref int src[MAXN]);
    for (int i = 0; i < n; i++) begin
      @(negedge clk); we = 1; addr = AW'(i); wdata = DW'(src[i]);
    end
    @(negedge clk); we = 0;
  endtask

  task automatic run(int n, bit inv);
    automatic int cyc = 0;
    @(negedge clk); start = 1; inverse = inv; len = (AW+1)'(n);
    @(negedge clk); start = 0;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != n) begin failures++; $display("latency %0d != %0d", cyc, n); end
  endtask

  initial begin
    we = 0; start = 0; inverse = 0; addr = 0; wdata = 0; len = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      automatic int n = 4 + 2 * ($urandom % ((MAXN - 4) / 2 + 1));
      for (int i = 0; i < n; i++) x[i] = (t % 2) ? int'($urandom % 256) : int'($urandom % 2048) - 1024;
      if (t == 0) for (int i = 0; i < n; i++) x[i] = 255 * (i % 2);  // extreme alternating line
      ref_fwd(n);
      load(n, x);
      run(n, 0);
      for (int i = 0; i < n; i++) begin
        addr = AW'(i); #1;
        checks++;
        if (int'(rdata) != y[i]) begin
          failures++;
          if (failures < 10) $display("fwd n=%0d i=%0d got %0d exp %0d", n, i, rdata, y[i]);
        end
      end
      run(n, 1);
      for (int i = 0; i < n; i++) begin
        addr = AW'(i); #1;
        checks++;
        if (int'(rdata) != x[i]) begin
          failures++;
          if (failures < 10) $display("inv n=%0d i=%0d got %0d exp %0d", n, i, rdata, x[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
