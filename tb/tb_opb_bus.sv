// tb_opb_bus: three model slaves (each a 16-word register file answering
// after a different number of clocks) behind the bus. Random writes and
// reads at random slaves must land in the right slave only and read back;
// an address outside every window must be answered with err_ack.
module tb_opb_bus;
  import dips_pkg::*;
  logic clk = 0, rst_n = 0;
  opb_m2s_t m;
  opb_s2m_t mo;
  opb_m2s_t [2:0] so;
  opb_s2m_t [2:0] si;
  int checks = 0, failures = 0;
  logic [31:0] regs [3][16];
  logic [31:0] model [3][16];
  int lat_cnt [3];

  opb_bus dut (.clk, .rst_n, .m_i(m), .m_o(mo), .s_o(so), .s_i(si));
  opb_master_bfm bfm (.clk, .rst_n, .m, .s(mo));

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model slaves: slave i acknowledges i+1 clocks after select
  for (genvar i = 0; i < 3; i++) begin : g_slv
    always @(posedge clk) begin
      si[i] <= '0;
      if (!rst_n || !so[i].select || si[i].xfer_ack) lat_cnt[i] <= 0;
      else if (lat_cnt[i] == i) begin
        si[i].xfer_ack <= 1'b1;
        if (so[i].rnw) si[i].dbus <= regs[i][so[i].abus[5:2]];
        else regs[i][so[i].abus[5:2]] <= so[i].dbus;
        lat_cnt[i] <= 0;
      end else lat_cnt[i] <= lat_cnt[i] + 1;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 12) $display("FAIL %s", what); end
  endtask

  logic [31:0] base [3] = '{DWT_BASE, IMG_BASE, EXT_BASE + 32'h0100_0000};
  logic [31:0] d;

  initial begin
    for (int i = 0; i < 3; i++) for (int j = 0; j < 16; j++) begin regs[i][j] = 0; model[i][j] = 0; end
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      automatic int sl = $urandom % 3, w = $urandom % 16;
      if ($urandom % 2) begin
        automatic logic [31:0] v = $urandom;
        bfm.wr(base[sl] + 4 * w, v);
        model[sl][w] = v;
      end else begin
        bfm.rd(base[sl] + 4 * w, d);
        check(d == model[sl][w], $sformatf("slave %0d word %0d got %h exp %h", sl, w, d, model[sl][w]));
      end
    end
    for (int i = 0; i < 3; i++) for (int j = 0; j < 16; j++)
      check(regs[i][j] == model[i][j], "slave contents");
    // unmapped address: error answer, no slave touched
    @(negedge clk); m = '{select: 1'b1, rnw: 1'b1, abus: 32'h1000_0000, dbus: '0};
    #1;
    check(so[0].select == 0 && so[1].select == 0 && so[2].select == 0, "no slave selected on miss");
    check(!mo.xfer_ack, "no answer in the request cycle");
    @(posedge clk); #1;
    check(mo.xfer_ack && mo.err_ack && mo.dbus == 0, "miss answered with err_ack");
    @(negedge clk); m = '0;
    check(bfm.bus_errors == 0, "read bus idle when not acknowledging");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
