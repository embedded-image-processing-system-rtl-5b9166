// tb_win3x3: pushes random images of several row lengths (with random gaps
// between pushes) through the window generator and compares, after every push whose neighbourhood lies
// inside the image, all nine window pixels with the stored image.
module tb_win3x3;
  import dips_pkg::*;
  localparam int MAXW = 16, H = 7;
  int W;
  logic clk = 0, rst_n = 0, clr = 0, push = 0;
  logic [4:0] width;
  logic [7:0] pix;
  win3_t win;
  int checks = 0, failures = 0;
  logic [7:0] img [H][MAXW];

  win3x3 #(.MAX_WIDTH(MAXW)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int f = 0; f < 6; f++) begin
      W = (f < 2) ? 10 : (f < 4 ? MAXW : 3 + f);
      width = 5'(W);
      if (f == 2 || f == 4 || f == 5) begin @(negedge clk); clr = 1; @(negedge clk); clr = 0; end
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) img[r][c] = 8'($urandom);
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) begin
        while ($urandom % 3 == 0) @(negedge clk);   // idle cycles
        push = 1; pix = img[r][c];
        @(negedge clk); push = 0;
        if (r >= 2 && c >= 2) begin
          for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) begin
            checks++;
            if (win[i][j] != img[r-2+i][c-2+j]) begin
              failures++;
              if (failures < 10) $display("r%0d c%0d win[%0d][%0d]=%0d exp %0d", r, c, i, j, win[i][j], img[r-2+i][c-2+j]);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
