// edge3x3: max-difference edge detector on one 3x3 neighbourhood
// (combinational).
//
// The absolute differences of the four pixel pairs that face each other
// across the centre are formed: horizontal (left/right), vertical
// (top/bottom) and the two diagonals. If the largest of them is greater than
// the threshold, the output is that largest difference; otherwise it is 0.
// The rule is the system's; the choice of exactly these four pairs is this
// design's reading of "horizontal, vertical and diagonal pixels". The window
// is indexed [row][col], row 0 on top.
module edge3x3
  import dips_pkg::*;
(
  input  win3_t      win,
  input  logic [7:0] threshold,
  output logic [7:0] pix
);

  function automatic logic [7:0] absdiff(logic [7:0] a, logic [7:0] b);
    return (a > b) ? a - b : b - a;
  endfunction

  logic [7:0] d_h, d_v, d_d1, d_d2, m1, m2, dmax;

  always_comb begin
    d_h  = absdiff(win[1][0], win[1][2]);
    d_v  = absdiff(win[0][1], win[2][1]);
    d_d1 = absdiff(win[0][0], win[2][2]);
    d_d2 = absdiff(win[0][2], win[2][0]);
    m1   = (d_h  > d_v)  ? d_h  : d_v;
    m2   = (d_d1 > d_d2) ? d_d1 : d_d2;
    dmax = (m1 > m2) ? m1 : m2;
    pix  = (dmax > threshold) ? dmax : 8'd0;
  end

endmodule
