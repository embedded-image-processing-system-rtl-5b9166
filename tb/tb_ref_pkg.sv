// tb_ref_pkg: reference models used by the image-engine testbenches.
// ref_image computes the expected output image of a whole frame from the
// definitions of the operators (3x3 masks, |Ox|+|Oy| magnitudes, integer
// division truncating, clipping to 0..255, max-difference edge rule, border
// pixels 0), independently of the RTL's structure. lift_fwd/lift_inv are the
// LeGall 5/3 lifting equations on an integer line with symmetric extension.
package tb_ref_pkg;

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction
  function automatic int clip(int v); return v < 0 ? 0 : (v > 255 ? 255 : v); endfunction
  function automatic int fl2(int v); return (v >= 0) ? v / 2 : -((-v + 1) / 2); endfunction
  function automatic int fl4(int v); return (v >= 0) ? v / 4 : -((-v + 3) / 4); endfunction

  // p: 3x3 neighbourhood as p[row*3+col]
  function automatic int ref_pixel(int p[9], int mode, int thr, int w);
    int s = 0, cc = p[4], gx, gy, m = 0;
    int d[4];
    foreach (p[i]) s += p[i];
    case (mode)
      0: return s / 9;
      1: return clip((8 * cc - (s - cc)) / 9);
      2: return clip((w * cc - (s - cc)) / 9);
      3: begin
        gx = -p[0] - 2*p[1] - p[2] + p[6] + 2*p[7] + p[8];
        gy = -p[0] - 2*p[3] - p[6] + p[2] + 2*p[5] + p[8];
        return clip(iabs(gx) + iabs(gy));
      end
      4: begin
        gx = -p[0] - p[1] - p[2] + p[6] + p[7] + p[8];
        gy = -p[0] - p[3] - p[6] + p[2] + p[5] + p[8];
        return clip(iabs(gx) + iabs(gy));
      end
      5: begin
        d[0] = iabs(p[3] - p[5]); d[1] = iabs(p[1] - p[7]);
        d[2] = iabs(p[0] - p[8]); d[3] = iabs(p[2] - p[6]);
        foreach (d[i]) if (d[i] > m) m = d[i];
        return (m > thr) ? m : 0;
      end
      default: return cc;
    endcase
  endfunction

  // img and out are row-major, w x h
  function automatic void ref_image(ref int img[], ref int out[], input int w, input int h,
                                    input int mode, input int thr, input int wt);
    int p[9];
    out = new[w * h];
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        if (r == 0 || c == 0 || r == h - 1 || c == w - 1) out[r*w + c] = 0;
        else begin
          for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++)
            p[i*3 + j] = img[(r - 1 + i) * w + (c - 1 + j)];
          out[r*w + c] = ref_pixel(p, mode, thr, wt);
        end
      end
  endfunction

  // Forward 5/3 transform of x[0..n-1] into interleaved y.
  function automatic void lift_fwd(ref int x[], ref int y[], input int n);
    y = new[n];
    for (int k = 1; k < n; k += 2) y[k] = x[k] - fl2(x[k-1] + ((k + 1 < n) ? x[k+1] : x[k-1]));
    for (int k = 0; k < n; k += 2) y[k] = x[k] + fl4(((k > 0) ? y[k-1] : y[k+1]) + y[k+1] + 2);
  endfunction

endpackage
