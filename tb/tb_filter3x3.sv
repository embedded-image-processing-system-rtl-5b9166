// tb_filter3x3: checks every filter mode on random and hand-made windows
// against integer arithmetic written directly from the masks.
module tb_filter3x3;
  import dips_pkg::*;
  win3_t      win;
  img_mode_e  mode;
  logic [7:0] weight, pix;
  int checks = 0, failures = 0;

  filter3x3 dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int p(int r, int c); return int'(win[r][c]); endfunction
  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction
  function automatic int clip(int v); return v < 0 ? 0 : (v > 255 ? 255 : v); endfunction

  function automatic int expected(img_mode_e md, int w);
    int s = 0, cc = p(1, 1), gx, gy;
    for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) s += p(r, c);
    case (md)
      MODE_LOWPASS:   return s / 9;
      MODE_HIGHPASS:  return clip((8 * cc - (s - cc)) / 9);
      MODE_HIGHBOOST: return clip((w * cc - (s - cc)) / 9);
      MODE_SOBEL: begin
        gx = -p(0,0) - 2*p(0,1) - p(0,2) + p(2,0) + 2*p(2,1) + p(2,2);
        gy = -p(0,0) - 2*p(1,0) - p(2,0) + p(0,2) + 2*p(1,2) + p(2,2);
        return clip(iabs(gx) + iabs(gy));
      end
      MODE_PREWITT: begin
        gx = -p(0,0) - p(0,1) - p(0,2) + p(2,0) + p(2,1) + p(2,2);
        gy = -p(0,0) - p(1,0) - p(2,0) + p(0,2) + p(1,2) + p(2,2);
        return clip(iabs(gx) + iabs(gy));
      end
      default: return cc;
    endcase
  endfunction

  initial begin
    img_mode_e modes[6] = '{MODE_LOWPASS, MODE_HIGHPASS, MODE_HIGHBOOST, MODE_SOBEL, MODE_PREWITT, MODE_EDGE};
    for (int t = 0; t < 3000; t++) begin
      for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) begin
        case (t % 4)
          0: win[r][c] = 8'($urandom);
          1: win[r][c] = (c == 2) ? 8'd255 : 8'd0;           // vertical step
          2: win[r][c] = (r == 0) ? 8'($urandom % 30) : 8'(200 + $urandom % 56);
          default: win[r][c] = (r == 1 && c == 1) ? 8'd255 : 8'($urandom % 16);
        endcase
      end
      weight = (t % 3 == 0) ? 8'd9 : 8'($urandom);
      foreach (modes[i]) begin
        mode = modes[i];
        #1;
        checks++;
        if (int'(pix) != expected(mode, int'(weight))) begin
          failures++;
          if (failures < 10) $display("mode %s got %0d exp %0d", mode.name(), pix, expected(mode, int'(weight)));
        end
      end
    end
    // hand-worked values: flat 90 window, vertical 0/255 step
    win = '{default: '{default: 8'd90}}; mode = MODE_LOWPASS; #1; checks++; if (pix != 90) failures++;
    mode = MODE_HIGHPASS; #1; checks++; if (pix != 0) failures++;
    weight = 8'd10; mode = MODE_HIGHBOOST; #1; checks++; if (pix != 20) failures++;  // (10*90 - 8*90) / 9
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
