// win3x3: 3x3 neighbourhood generator for a raster-order pixel stream.
//
// Two line buffers of MAX_WIDTH pixels hold the two previous image rows. On each
// push of pixel p at column c, the column {row r-2, row r-1, p} read from the
// buffers at c is shifted into a 3x3 register window and the buffers are
// updated (row r-1 moves to the older buffer, p to the newer one). After the
// push the window holds the neighbourhood centred on the pixel one row up and
// one column to the left of p; columns that wrap across a row boundary give
// meaningless windows, which the consumer treats as image border.
// Timing: win is valid from the clock edge of the push until the next push.
// The row length is set at run time by width (3..MAX_WIDTH); it must not
// change within a frame. clr restarts at column 0 (buffer contents are left
// as they are).
// The line-buffer structure is this design's choice; the system only states
// that its filters work on 3x3 windows.
module win3x3
  import dips_pkg::*;
#(
  parameter int unsigned MAX_WIDTH = 512,
  localparam int unsigned CW       = $clog2(MAX_WIDTH)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clr,
  input  logic [CW:0] width,
  input  logic       push,
  input  logic [7:0] pix,
  output win3_t      win
);

  logic [7:0]    lb_new [MAX_WIDTH];   // row r-1
  logic [7:0]    lb_old [MAX_WIDTH];   // row r-2
  logic [CW-1:0] col_q;
  win3_t         win_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_q <= '0;
      win_q <= '0;
    end else if (clr) begin
      col_q <= '0;
    end else if (push) begin
      col_q <= ((CW+1)'(col_q) + 1'b1 >= width) ? '0 : col_q + 1'b1;
      for (int r = 0; r < 3; r++) begin
        win_q[r][0] <= win_q[r][1];
        win_q[r][1] <= win_q[r][2];
      end
      win_q[0][2] <= lb_old[col_q];
      win_q[1][2] <= lb_new[col_q];
      win_q[2][2] <= pix;
    end
  end

  always_ff @(posedge clk) begin
    if (push && !clr) begin
      lb_old[col_q] <= lb_new[col_q];
      lb_new[col_q] <= pix;
    end
  end

  assign win = win_q;

endmodule
