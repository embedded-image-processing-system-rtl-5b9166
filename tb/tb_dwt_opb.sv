// tb_dwt_opb: bus-level test of the wavelet peripheral.
// An OPB master task writes random lines into the buffer, starts a forward
// transform, and reads back low-pass then high-pass coefficients, compared
// with a reference computed from the lifting equations. The coefficients are
// then written back in subband order, an inverse transform is run, and the
// natural-order result must equal the original line. Also checked: the LEN
// and STATUS registers, the sticky done/irq behaviour, that start is ignored
// while busy, and that the core stays busy for exactly N clocks.
module tb_dwt_opb;
  import dips_pkg::*;
  localparam int DW = 16, MAXN = 32;
  logic clk = 0, rst_n = 0;
  opb_m2s_t m;
  opb_s2m_t s;
  logic irq;
  int checks = 0, failures = 0;

  dwt_opb #(.DW(DW), .MAXN(MAXN)) dut (.clk, .rst_n, .opb_i(m), .opb_o(s), .irq);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 12) $display("FAIL %s", what); end
  endtask

  task automatic opb_wr(logic [31:0] a, logic [31:0] d);
    @(negedge clk); m = '{select: 1'b1, rnw: 1'b0, abus: a, dbus: d};
    do @(posedge clk); while (!s.xfer_ack);
    @(negedge clk); m = '0;
  endtask

  task automatic opb_rd(logic [31:0] a, output logic [31:0] d);
    @(negedge clk); m = '{select: 1'b1, rnw: 1'b1, abus: a, dbus: '0};
    do @(posedge clk); while (!s.xfer_ack);
    d = s.dbus;
    @(negedge clk); m = '0;
  endtask

  function automatic int fl2(int v); return (v >= 0) ? v / 2 : -((-v + 1) / 2); endfunction
  function automatic int fl4(int v); return (v >= 0) ? v / 4 : -((-v + 3) / 4); endfunction

  int x[MAXN], y[MAXN];
  logic [31:0] d;

  // s.dbus must be zero whenever the slave is not acknowledging.
  always @(posedge clk) if (rst_n && !s.xfer_ack && s.dbus != 0) begin
    failures++; $display("read bus not idle");
  end

  initial begin
    m = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    opb_rd(32'h0004, d);
    check(d == MAXN, "LEN reset value");
    for (int t = 0; t < 12; t++) begin
      automatic int n = 4 + 2 * ($urandom % ((MAXN - 4) / 2 + 1));
      int busy_cycles;
      for (int i = 0; i < n; i++) x[i] = int'($urandom % 256);
      for (int k = 1; k < n; k += 2) y[k] = x[k] - fl2(x[k-1] + ((k + 1 < n) ? x[k+1] : x[k-1]));
      for (int k = 0; k < n; k += 2) y[k] = x[k] + fl4(((k > 0) ? y[k-1] : y[k+1]) + y[k+1] + 2);
      opb_wr(32'h0004, n);
      opb_rd(32'h0004, d);
      check(d == n, "LEN readback");
      opb_wr(32'h0000, 0);                       // forward mode
      for (int i = 0; i < n; i++) opb_wr(32'h1000 + 4 * i, x[i]);
      // start, then count the clocks the core stays busy
      @(negedge clk); m = '{select: 1'b1, rnw: 1'b0, abus: 32'h0, dbus: 32'h1};
      @(posedge clk);                            // start takes effect here
      @(negedge clk); m = '0;
      busy_cycles = 0;
      // the core is busy for N clocks; the sticky done bit (irq) rises one clock later
      while (!irq && busy_cycles < 4 * MAXN) begin @(negedge clk); busy_cycles++; end
      check(busy_cycles == n + 1, $sformatf("irq after %0d clocks for N=%0d", busy_cycles, n));
      check(irq == 1'b1, "irq after forward");
      opb_rd(32'h0000, d);
      check(d[1:0] == 2'b10, "status done");
      for (int i = 0; i < n; i++) begin
        automatic int e = (i < n / 2) ? y[2 * i] : y[2 * (i - n / 2) + 1];
        opb_rd(32'h1000 + 4 * i, d);
        check($signed(d) == e, $sformatf("fwd coef %0d: got %0d exp %0d", i, $signed(d), e));
      end
      // inverse: write back in subband order
      opb_wr(32'h0000, 32'h2);
      check(irq == 1'b1, "irq stays until next start");
      for (int i = 0; i < n; i++) begin
        automatic int e = (i < n / 2) ? y[2 * i] : y[2 * (i - n / 2) + 1];
        opb_wr(32'h1000 + 4 * i, e);
      end
      opb_wr(32'h0000, 32'h3);
      check(irq == 1'b0, "start clears done");
      // a second start while busy must be ignored
      if (n >= 12) opb_wr(32'h0000, 32'h1);
      opb_rd(32'h0000, d);
      while (d[0]) opb_rd(32'h0000, d);
      check(d[2:1] == 2'b11, "inverse mode kept, done");
      for (int i = 0; i < n; i++) begin
        opb_rd(32'h1000 + 4 * i, d);
        check($signed(d) == x[i], $sformatf("inv sample %0d: got %0d exp %0d", i, $signed(d), x[i]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
