// tb_img_opb: the filter peripheral driven over the bus the way the
// processor would: configure CTRL, then for every pixel write DIN and read
// DOUT until it is empty, and after the last pixel read until the last-pixel
// flag. The collected images are compared with the reference model for
// several modes. A deliberate second DIN write without reading must set the
// overrun flag, which a STAT read then clears; a CTRL restart must discard
// a half-streamed frame. The SIZE register is changed between frames.
module tb_img_opb;
  import dips_pkg::*;
  import tb_ref_pkg::*;
  localparam int MAXW = 8, MAXH = 6;
  int W = MAXW, H = MAXH;
  logic clk = 0, rst_n = 0;
  opb_m2s_t m;
  opb_s2m_t s;
  int checks = 0, failures = 0;

  img_opb #(.MAX_WIDTH(MAXW), .MAX_HEIGHT(MAXH)) dut (.clk, .rst_n, .opb_i(m), .opb_o(s));
  opb_master_bfm bfm (.clk, .rst_n, .m, .s);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 12) $display("FAIL %s", what); end
  endtask

  int img[], exp_img[];
  int got[$];
  logic [31:0] d;
  bit seen_last;

  task automatic drain_out();
    do begin
      bfm.rd(32'h8, d);
      if (d[31]) begin got.push_back(int'(d[7:0])); if (d[30]) seen_last = 1; end
    end while (d[31]);
  endtask

  task automatic frame(int md, int thr, int wt);
    img = new[W * H];
    for (int i = 0; i < W * H; i++) img[i] = int'($urandom % 256);
    bfm.wr(32'h10, {16'(H), 16'(W)});
    bfm.rd(32'h10, d);
    check(d == {16'(H), 16'(W)}, "SIZE readback");
    bfm.wr(32'h0, {8'd0, 8'(wt), 8'(thr), 8'(md)});
    bfm.rd(32'h0, d);
    check(d[23:0] == {8'(wt), 8'(thr), 8'(md)}, "CTRL readback");
    got.delete(); seen_last = 0;
    ref_image(img, exp_img, W, H, md, thr, wt);
    for (int i = 0; i < W * H; i++) begin
      bfm.wr(32'h4, img[i]);
      drain_out();
    end
    while (!seen_last) drain_out();
    check(got.size() == W * H, $sformatf("got %0d pixels", got.size()));
    for (int i = 0; i < W * H && i < got.size(); i++)
      check(got[i] == exp_img[i], $sformatf("mode %0d pixel %0d got %0d exp %0d", md, i, got[i], exp_img[i]));
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    bfm.rd(32'h0, d);
    check(d[23:0] == 24'h09_00_00, "CTRL reset value");
    bfm.rd(32'h10, d);
    check(d == {16'(MAXH), 16'(MAXW)}, "SIZE reset value");
    // the peripheral decodes only the low offset bits; frame() uses offsets
    frame(0, 0, 9);
    W = 5; H = 4;
    frame(2, 0, 11);
    W = MAXW; H = 3;
    frame(5, 25, 0);
    W = MAXW; H = MAXH;
    frame(4, 0, 0);
    // overrun: fill the pipeline past WIDTH+1, then write twice without reading
    bfm.wr(32'h0, 32'h8000_0001);                 // restart, high-pass
    for (int i = 0; i < W + 2; i++) begin bfm.wr(32'h4, i); drain_out(); end
    bfm.wr(32'h4, 1);                             // produces an output, slot now full
    bfm.wr(32'h4, 2);                             // dropped
    bfm.rd(32'hC, d);
    check(d[2:1] == 2'b11 && d[0] == 1'b0, $sformatf("overrun flagged, STAT=%h", d));
    bfm.rd(32'hC, d);
    check(d[2] == 1'b0, "overrun cleared by read");
    // restart discards the half frame; a full frame then comes out right
    bfm.wr(32'h0, 32'h8000_0003);
    bfm.rd(32'hC, d);
    check(d[1:0] == 2'b01, "restart empties the output");
    frame(3, 0, 0);
    check(bfm.bus_errors == 0, "read bus idle when not acknowledging");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
