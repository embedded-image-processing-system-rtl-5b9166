// filter3x3: the 3x3 mask filters of the image engine, applied to one
// neighbourhood (combinational).
//
// Masks, with c the centre pixel and s8 the sum of its eight neighbours:
//   low-pass   (smoothing)  out = (c + s8) / 9          all-ones mask, 1/9
//   high-pass               out = (8c - s8) / 9         centre 8, others -1, 1/9
//   high-boost              out = (w*c - s8) / 9        centre w, others -1, 1/9
//   Sobel      out = |Ox| + |Oy|, Ox = [-1 -2 -1; 0 0 0; 1 2 1], Oy = its transpose
//   Prewitt    out = |Ox| + |Oy|, Ox = [-1 -1 -1; 0 0 0; 1 1 1], Oy = its transpose
// The mask coefficients and the 1/9 scale are those of the system's filter
// set; combining the two directional Sobel/Prewitt responses as |Ox| + |Oy|,
// the integer rounding (division truncates, negative results become 0) and
// saturation at 255 are this design's choices. Any other mode code passes the
// centre pixel through unchanged. The window is indexed [row][col], row 0 on
// top; the output is an 8-bit pixel.
module filter3x3
  import dips_pkg::*;
(
  input  win3_t      win,
  input  img_mode_e  mode,
  input  logic [7:0] weight,   // w of the high-boost mask
  output logic [7:0] pix
);

  logic [11:0]        s8, s9;           // sums of 8 or 9 pixels (<= 2295)
  logic [7:0]         c;
  logic signed [17:0] hp, hb;           // signed mask responses
  logic signed [11:0] sob_x, sob_y, pre_x, pre_y;
  logic [11:0]        sob_mag, pre_mag;

  function automatic logic [11:0] abs12(logic signed [11:0] v);
    return v[11] ? 12'(-v) : 12'(v);
  endfunction

  function automatic logic [7:0] sat8(logic [17:0] v);
    return (v > 18'd255) ? 8'd255 : v[7:0];
  endfunction

  always_comb begin
    c  = win[1][1];
    s9 = '0;
    for (int r = 0; r < 3; r++)
      for (int k = 0; k < 3; k++)
        s9 = s9 + 12'(win[r][k]);
    s8 = s9 - 12'(c);
    hp = 18'(signed'({1'b0, c, 3'b000})) - 18'(signed'({1'b0, s8}));
    hb = 18'(signed'({1'b0, 16'(c) * 16'(weight)})) - 18'(signed'({1'b0, s8}));

    sob_x = (12'(win[2][0]) + 12'({win[2][1], 1'b0}) + 12'(win[2][2]))
          - (12'(win[0][0]) + 12'({win[0][1], 1'b0}) + 12'(win[0][2]));
    sob_y = (12'(win[0][2]) + 12'({win[1][2], 1'b0}) + 12'(win[2][2]))
          - (12'(win[0][0]) + 12'({win[1][0], 1'b0}) + 12'(win[2][0]));
    pre_x = (12'(win[2][0]) + 12'(win[2][1]) + 12'(win[2][2]))
          - (12'(win[0][0]) + 12'(win[0][1]) + 12'(win[0][2]));
    pre_y = (12'(win[0][2]) + 12'(win[1][2]) + 12'(win[2][2]))
          - (12'(win[0][0]) + 12'(win[1][0]) + 12'(win[2][0]));
    sob_mag = abs12(sob_x) + abs12(sob_y);
    pre_mag = abs12(pre_x) + abs12(pre_y);

    unique case (mode)
      MODE_LOWPASS:   pix = 8'(s9 / 12'd9);
      MODE_HIGHPASS:  pix = hp[17] ? 8'd0 : sat8(18'(hp) / 18'd9);
      MODE_HIGHBOOST: pix = hb[17] ? 8'd0 : sat8(18'(hb) / 18'd9);
      MODE_SOBEL:     pix = sat8(18'(sob_mag));
      MODE_PREWITT:   pix = sat8(18'(pre_mag));
      default:        pix = c;
    endcase
  end

endmodule
