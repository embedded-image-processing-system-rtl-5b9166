// tb_img_engine: whole frames through the streaming engine, every mode.
// Random images (and a bright disc for the edge modes) are streamed in raster
// order; the output image is compared pixel by pixel with the reference model.
// Frames are run with in_valid and out_ready each toggled at random (so the
// engine stalls on both sides) and once with both held high, where a frame
// must take exactly width*height + width + 1 clocks from the first input to
// the last output (one pixel per clock plus the drain of the last width+1
// border pixels). The counts of stalls, in_stalls and out_last are checked too.
module tb_img_engine;
  import dips_pkg::*;
  import tb_ref_pkg::*;
  localparam int MAXW = 12, MAXH = 9;
  int W = MAXW, H = MAXH;
  logic clk = 0, rst_n = 0, clr = 0;
  logic [4:0] width;
  logic [4:0] height;
  img_mode_e mode;
  logic [7:0] threshold, weight, in_data, out_data;
  logic in_valid, in_ready, out_valid, out_ready, out_last;
  int checks = 0, failures = 0;
  int stalls = 0, in_stalls = 0, lasts = 0;
  bit rand_in, rand_out;

  img_engine #(.MAX_WIDTH(MAXW), .MAX_HEIGHT(MAXH)) dut (.*);
  assign width = 5'(W);
  assign height = 5'(H);

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

  always @(posedge clk) begin
    if (rst_n && out_valid && !out_ready) stalls++;
    if (rst_n && !in_ready && in_valid) in_stalls++;
  end

  int img[], exp_img[];
  int got[$];
  int t_first, t_last, cyc;

  always @(posedge clk) cyc++;

  task automatic run_frame(int md, bit ri, bit ro);
    int n_in = 0;
    mode = img_mode_e'(md); rand_in = ri; rand_out = ro;
    got.delete();
    ref_image(img, exp_img, W, H, md, threshold, weight);
    fork
      begin
        while (n_in < W * H) begin
          @(negedge clk);
          in_valid = rand_in ? ($urandom % 3 != 0) : 1'b1;
          in_data  = 8'(img[n_in]);
          @(posedge clk);
          if (in_valid && in_ready) begin
            if (n_in == 0) t_first = cyc;
            n_in++;
          end
        end
        @(negedge clk); in_valid = 0;
      end
      begin
        while (got.size() < W * H) begin
          @(negedge clk);
          out_ready = rand_out ? ($urandom % 3 != 0) : 1'b1;
          @(posedge clk);
          if (out_valid && out_ready) begin
            got.push_back(int'(out_data));
            if (out_last) begin lasts++; t_last = cyc; end
            if (out_last != (got.size() == W * H)) begin failures++; $display("out_last misplaced"); end
          end
        end
        @(negedge clk); out_ready = 0;
      end
    join
    for (int i = 0; i < W * H; i++)
      check(got[i] == exp_img[i], $sformatf("mode %0d pixel %0d got %0d exp %0d", md, i, got[i], exp_img[i]));
  endtask

  initial begin
    in_valid = 0; out_ready = 0; in_data = 0; mode = MODE_LOWPASS;
    threshold = 8'd30; weight = 8'd12;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int md = 0; md < 7; md++) begin
      W = (md % 3 == 0) ? MAXW : (md % 3 == 1 ? 5 : 3 + md);
      H = (md % 2 == 0) ? MAXH : 3 + md % 4;
      img = new[W * H];
      for (int i = 0; i < W * H; i++) begin
        automatic int r = i / W, c = i % W;
        img[i] = (md >= 3 && md <= 5) ? (((r - H/2) * (r - H/2) + (c - W/2) * (c - W/2) < 10) ? 220 : 40) + int'($urandom % 8)
                                      : int'($urandom % 256);
      end
      run_frame(md, 1, 1);
    end
    // full-rate frame: one pixel per clock
    W = MAXW; H = MAXH; img = new[W * H];
    for (int i = 0; i < W * H; i++) img[i] = int'($urandom % 256);
    threshold = 8'd10;
    run_frame(5, 0, 0);
    check(t_last - t_first == W * H + W + 1, $sformatf("frame took %0d clocks, expected %0d", t_last - t_first, W * H + W + 1));
    // clr in the middle of a frame, then a clean frame
    mode = MODE_SOBEL;
    @(negedge clk); in_valid = 1; out_ready = 1;
    repeat (W * 3) @(negedge clk);
    in_valid = 0; clr = 1; @(negedge clk); clr = 0; out_ready = 0;
    run_frame(3, 1, 0);
    check(stalls > 0, "output stall seen");
    check(in_stalls > 0, "input held off (full output or drain) seen");
    check(lasts == 9, $sformatf("out_last count %0d", lasts));
    $display("stalls=%0d input_stall_cycles=%0d frames=%0d", stalls, in_stalls, lasts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
