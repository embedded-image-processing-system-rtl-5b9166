// tb_dips_top: end-to-end test of the whole system at its default sizes
// (512 x 512 images, 512-sample wavelet lines). A bus-functional processor
// does what the system software does:
//  * filtering: for each of the six operators, every pixel of a 256 x 256
//    test image (plus one 300 x 246 edge-detection frame, set through the
//    SIZE register) is read from the external SRAM, written to the image engine,
//    and the engine's outputs are collected and written back to SRAM; the result
//    image is compared with the reference model;
//  * wavelets: a two-level 2-D forward 5/3 transform of the image (row passes
//    then column passes on the LL band of each level) through the wavelet
//    core, compared with a reference built from the lifting equations, then
//    the two-level inverse, which must give back the original exactly;
//  * an overrun of the image engine, and an access outside every address
//    window, which must be answered with an error.
// Each mechanism (six modes, engine stall/overrun, frame drain, border
// zeroing, forward and inverse line transforms, wavelet interrupt, external
// window access, bus error) is counted; one that never happened is a failure.
module tb_dips_top;
  import dips_pkg::*;
  import tb_ref_pkg::*;
  localparam int N = 512;
  int W = 512, H = 512;
  // Four pixels per SRAM word (a 512 x 512 image at one pixel per word would
  // fill the whole 256K-word SRAM): source image at word 0, result at 128K.
  localparam logic [31:0] SRAM_SRC = EXT_BASE;
  localparam logic [31:0] SRAM_DST = EXT_BASE + 32'h0008_0000;
  localparam int DST_WORD = 128 * 1024;
  logic clk = 0, rst_n = 0;
  opb_m2s_t cpu_m, ext_m;
  opb_s2m_t cpu_s, ext_s;
  logic dwt_irq;
  int checks = 0, failures = 0;
  int cnt_mode [6];
  int cnt_overrun = 0, cnt_drain = 0, cnt_border = 0, cnt_fwd = 0, cnt_inv = 0;
  int cnt_irq = 0, cnt_ext = 0, cnt_err = 0;

  dips_top dut (.clk, .rst_n, .cpu_opb_i(cpu_m), .cpu_opb_o(cpu_s),
                .ext_opb_o(ext_m), .ext_opb_i(ext_s), .dwt_irq);
  sram_opb_model sram (.clk, .opb_i(ext_m), .opb_o(ext_s));
  opb_master_bfm bfm (.clk, .rst_n, .m(cpu_m), .s(cpu_s));

  always #5 clk = ~clk;
  initial begin
    repeat (150_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired after %0d bus transfers", bfm.n_xfers);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (ext_m.select && ext_s.xfer_ack) cnt_ext++;
    if (dwt_irq && !$past(dwt_irq)) cnt_irq++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 12) $display("FAIL %s", what); end
    if (failures >= 1000) begin
      $display("too many failures, stopping");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  endtask

  int img[], exp_img[], coef[], rec[];
  logic [31:0] d;

  // Synthetic test picture: smooth shading, a bright disc, a dark bar, noise.
  function automatic int picture(int r, int c);
    int v = (r + c) / 4;
    if ((r - 200) * (r - 200) + (c - 280) * (c - 280) < 10000) v = 230;
    if (r > 360 && r < 400 && c > 60 && c < 440) v = 15;
    v += int'($urandom % 9) - 4;
    return clip(v);
  endfunction

  // ---------------- filtering through the image engine ----------------
  task automatic filter_frame(int md, int thr, int wt);
    int k = 0;
    bit last = 0;
    logic [31:0] src_w = '0, dst_w = '0;
    bfm.wr(IMG_BASE + 32'h10, {16'(H), 16'(W)});
    bfm.wr(IMG_BASE + 32'h0, {1'b1, 7'd0, 8'(wt), 8'(thr), 8'(md)});
    for (int i = 0; i < W * H; i++) begin
      if (i % 4 == 0) bfm.rd(SRAM_SRC + i, src_w);   // word i/4
      bfm.wr(IMG_BASE + 32'h4, {24'd0, src_w[8 * (i % 4) +: 8]});
      for (int guard = 0; ; guard++) begin
        bfm.rd(IMG_BASE + 32'h8, d);
        if (!d[31]) break;
        check(guard < 2 * W, "engine returns more pixels than it can hold");
        dst_w[8 * (k % 4) +: 8] = d[7:0];
        if (k % 4 == 3) bfm.wr(SRAM_DST + 32'(k - 3), dst_w);
        k++;
        if (i == W * H - 1) cnt_drain++;     // border pixels drained after the last input
        if (d[30]) last = 1;
      end
    end
    for (int guard = 0; !last; guard++) begin
      check(guard < 4 * W, "frame end (last flag) not seen");
      bfm.rd(IMG_BASE + 32'h8, d);
      if (d[31]) begin
        dst_w[8 * (k % 4) +: 8] = d[7:0];
        if (k % 4 == 3) bfm.wr(SRAM_DST + 32'(k - 3), dst_w);
        k++;
        last = d[30];
        cnt_drain++;
      end
    end
    check(k == W * H, $sformatf("mode %0d: %0d output pixels", md, k));
    ref_image(img, exp_img, W, H, md, thr, wt);
    for (int i = 0; i < W * H; i++) begin
      automatic int r = i / W, c = i % W;
      automatic int g = int'(sram.mem[DST_WORD + i / 4][8 * (i % 4) +: 8]);
      check(g == exp_img[i], $sformatf("mode %0d pixel (%0d,%0d) got %0d exp %0d", md, r, c, g, exp_img[i]));
      if ((r == 0 || c == 0 || r == H - 1 || c == W - 1) && g == 0) cnt_border++;
    end
    cnt_mode[md]++;
    $display("[%0t] filter mode %0d done", $time, md);
  endtask

  // ---------------- wavelets through the wavelet core ----------------
  // Transform one line of the array a (stride st, start s0, n samples).
  task automatic dwt_line(ref int a[], input int s0, input int st, input int n, input bit inv);
    bfm.wr(DWT_BASE + 32'h4, n);
    bfm.wr(DWT_BASE + 32'h0, {30'd0, inv, 1'b0});
    for (int i = 0; i < n; i++) bfm.wr(DWT_BASE + 32'h1000 + 4 * i, a[s0 + st * i]);
    bfm.wr(DWT_BASE + 32'h0, {30'd0, inv, 1'b1});
    for (int guard = 0; ; guard++) begin
      bfm.rd(DWT_BASE + 32'h0, d);
      if (!d[0]) break;
      check(guard < n, "wavelet core busy too long");
    end
    for (int i = 0; i < n; i++) begin
      bfm.rd(DWT_BASE + 32'h1000 + 4 * i, d);
      a[s0 + st * i] = int'($signed(d));
    end
    if (inv) cnt_inv++; else cnt_fwd++;
  endtask

  // Reference line transform (forward, subband order out).
  task automatic ref_line(ref int a[], input int s0, input int st, input int n);
    int x[], y[];
    x = new[n];
    for (int i = 0; i < n; i++) x[i] = a[s0 + st * i];
    lift_fwd(x, y, n);
    for (int i = 0; i < n / 2; i++) begin
      a[s0 + st * i]           = y[2 * i];
      a[s0 + st * (i + n / 2)] = y[2 * i + 1];
    end
  endtask

  initial begin
    int refc[];
    for (int i = 0; i < 6; i++) cnt_mode[i] = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    // a 300 x 246 frame first (size of a small test photograph)
    W = 300; H = 246;
    img = new[W * H];
    for (int i = 0; i < W * H; i++) begin
      img[i] = picture(i / W, i % W);
      sram.mem[i / 4][8 * (i % 4) +: 8] = 8'(img[i]);
    end
    filter_frame(5, 25, 0);
    W = 512; H = 512;
    img = new[W * H];
    for (int i = 0; i < W * H; i++) begin
      img[i] = picture(i / W, i % W);
      sram.mem[i / 4][8 * (i % 4) +: 8] = 8'(img[i]);
    end
    filter_frame(0, 0, 9);
    filter_frame(1, 0, 0);
    filter_frame(2, 0, 12);
    filter_frame(3, 0, 0);
    filter_frame(4, 0, 0);
    filter_frame(5, 20, 0);

    // overrun: two pixels written without reading the output in between
    bfm.wr(IMG_BASE + 32'h0, 32'h8000_0000);
    for (int i = 0; i < W + 3; i++) bfm.wr(IMG_BASE + 32'h4, i);  // W+2 pixels fill the engine
    bfm.rd(IMG_BASE + 32'hC, d);
    check(d[2] == 1'b1, "overrun flag");
    if (d[2]) cnt_overrun++;
    bfm.wr(IMG_BASE + 32'h0, 32'h8000_0000);

    // two-level 2-D forward wavelet transform
    coef = new[W * H]; refc = new[W * H];
    foreach (img[i]) begin coef[i] = img[i]; refc[i] = img[i]; end
    for (int lev = 0, sz = N; lev < 2; lev++, sz /= 2) begin
      for (int r = 0; r < sz; r++) begin dwt_line(coef, r * W, 1, sz, 0); ref_line(refc, r * W, 1, sz); end
      for (int c = 0; c < sz; c++) begin dwt_line(coef, c, W, sz, 0);     ref_line(refc, c, W, sz);     end
    end
    for (int i = 0; i < W * H; i++)
      check(coef[i] == refc[i], $sformatf("2-level FDWT coef %0d got %0d exp %0d", i, coef[i], refc[i]));
    // two-level inverse
    rec = new[W * H];
    foreach (coef[i]) rec[i] = coef[i];
    for (int lev = 1, sz = N / 2; lev >= 0; lev--, sz *= 2) begin
      for (int c = 0; c < sz; c++) dwt_line(rec, c, W, sz, 1);
      for (int r = 0; r < sz; r++) dwt_line(rec, r * W, 1, sz, 1);
    end
    for (int i = 0; i < W * H; i++)
      check(rec[i] == img[i], $sformatf("2-level IDWT pixel %0d got %0d exp %0d", i, rec[i], img[i]));

    // access outside every window
    bfm.rd(32'h1000_0000, d);
    check(bfm.last_err && d == 0, "unmapped read answered with error");
    if (bfm.last_err) cnt_err++;

    foreach (cnt_mode[i]) check(cnt_mode[i] > 0, $sformatf("mode %0d exercised", i));
    check(cnt_overrun > 0, "overrun exercised");
    check(cnt_drain > 0, "frame drain exercised");
    check(cnt_border > 0, "border zeroing exercised");
    check(cnt_fwd > 0 && cnt_inv > 0, "forward and inverse line transforms exercised");
    check(cnt_irq > 0, "wavelet interrupt exercised");
    check(cnt_ext > 0, "external window exercised");
    check(cnt_err > 0, "bus error exercised");
    check(bfm.bus_errors == 0, "read bus idle when not acknowledging");
    $display("modes=%0d,%0d,%0d,%0d,%0d,%0d overrun=%0d drain_reads=%0d border_px=%0d fwd_lines=%0d inv_lines=%0d irq=%0d ext=%0d err=%0d",
             cnt_mode[0], cnt_mode[1], cnt_mode[2], cnt_mode[3], cnt_mode[4], cnt_mode[5],
             cnt_overrun, cnt_drain, cnt_border, cnt_fwd, cnt_inv, cnt_irq, cnt_ext, cnt_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
