// img_engine: streaming 3x3 image filter and edge detector.
//
// Pixels of a width x height 8-bit image (set at run time, 3..MAX_WIDTH by
// 3..MAX_HEIGHT, not to be changed within a frame) enter in raster order over
// a valid/ready handshake and leave in the same order, one output per input
// pixel. mode (the control byte) selects low-pass, high-pass, high-boost,
// Sobel, Prewitt or the max-difference edge detector; threshold and weight
// parameterise the edge detector and the high-boost mask.
//
// A win3x3 line-buffer window follows the input; the output for pixel k is
// produced when pixel k + width + 1 has been accepted, because only then is
// its whole neighbourhood known. The last width + 1 outputs of a frame all
// lie on the image border, so after the final input pixel the engine drains
// them by itself (in_ready is low meanwhile) and is then ready for the next
// frame. Border pixels (first and last row and column), whose neighbourhood
// leaves the image, are output as 0; that border rule is this design's
// choice.
// Timing: one register stage. out_data is valid while out_valid is high and
// is held until out_ready; in_ready = output slot free or being emptied. With
// out_ready held high one pixel per clock is sustained, and a frame takes
// width*height + width + 1 clocks from first input to last output.
// clr restarts the frame. out_last marks the final pixel of a frame.
module img_engine
  import dips_pkg::*;
#(
  parameter int unsigned MAX_WIDTH  = 512,
  parameter int unsigned MAX_HEIGHT = 512,
  localparam int unsigned CW        = $clog2(MAX_WIDTH),
  localparam int unsigned RW        = $clog2(MAX_HEIGHT)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  input  logic [CW:0] width,
  input  logic [RW:0] height,
  input  img_mode_e   mode,
  input  logic [7:0]  threshold,
  input  logic [7:0]  weight,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [7:0]  in_data,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [7:0]  out_data,
  output logic        out_last
);

  logic          draining_q;
  logic [CW-1:0] icol_q, ocol_q;
  logic [RW-1:0] irow_q, orow_q;
  logic [CW:0]   drain_cnt_q;
  logic          out_valid_q, border_q, last_q;

  logic          push, slot_free, emit, in_last, ocol_end, orow_end;
  win3_t         win;
  logic [7:0]    filt_pix, edge_pix;

  assign slot_free = !out_valid_q || out_ready;
  assign in_ready  = !draining_q && slot_free;
  assign push      = in_valid && in_ready;
  assign in_last   = ((RW+1)'(irow_q) + 1'b1 == height) && ((CW+1)'(icol_q) + 1'b1 == width);
  assign ocol_end  = ((CW+1)'(ocol_q) + 1'b1 == width);
  assign orow_end  = ((RW+1)'(orow_q) + 1'b1 == height);
  // A push produces an output once width+1 pixels are in (index >= width+1);
  // during the drain every free output slot is filled.
  assign emit      = (push && (irow_q >= RW'(2) || (irow_q == RW'(1) && icol_q != '0)))
                   || (draining_q && slot_free);

  win3x3 #(.MAX_WIDTH(MAX_WIDTH)) u_win (
    .clk, .rst_n, .clr,
    .width,
    .push (push),
    .pix  (in_data),
    .win  (win)
  );

  filter3x3 u_filter (.win, .mode, .weight, .pix(filt_pix));
  edge3x3   u_edge   (.win, .threshold, .pix(edge_pix));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      draining_q  <= 1'b0;
      icol_q      <= '0;
      irow_q      <= '0;
      drain_cnt_q <= '0;
      ocol_q      <= '0;
      orow_q      <= '0;
      out_valid_q <= 1'b0;
      border_q    <= 1'b0;
      last_q      <= 1'b0;
    end else if (clr) begin
      draining_q  <= 1'b0;
      icol_q      <= '0;
      irow_q      <= '0;
      drain_cnt_q <= '0;
      ocol_q      <= '0;
      orow_q      <= '0;
      out_valid_q <= 1'b0;
    end else begin
      if (emit) begin
        out_valid_q <= 1'b1;
        border_q    <= (orow_q == '0) || orow_end || (ocol_q == '0) || ocol_end;
        last_q      <= orow_end && ocol_end;
        if (ocol_end) begin
          ocol_q <= '0;
          orow_q <= orow_end ? '0 : orow_q + 1'b1;
        end else begin
          ocol_q <= ocol_q + 1'b1;
        end
      end else if (out_ready) begin
        out_valid_q <= 1'b0;
      end

      if (push) begin
        if (in_last) begin
          icol_q     <= '0;
          irow_q     <= '0;
          draining_q <= 1'b1;
        end else if ((CW+1)'(icol_q) + 1'b1 == width) begin
          icol_q <= '0;
          irow_q <= irow_q + 1'b1;
        end else begin
          icol_q <= icol_q + 1'b1;
        end
      end

      if (draining_q && slot_free) begin
        if (drain_cnt_q == width) begin
          drain_cnt_q <= '0;
          draining_q  <= 1'b0;
        end else begin
          drain_cnt_q <= drain_cnt_q + 1'b1;
        end
      end
    end
  end

  assign out_valid = out_valid_q;
  assign out_last  = out_valid_q && last_q;
  assign out_data  = border_q ? 8'd0 : (mode == MODE_EDGE ? edge_pix : filt_pix);

  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n || clr)
                                 (out_valid && !out_ready) |=> (out_valid && $stable(out_data)));
  a_size_ok: assert property (@(posedge clk) disable iff (!rst_n)
                              push |-> (width >= 3 && 32'(width) <= MAX_WIDTH &&
                                        height >= 3 && 32'(height) <= MAX_HEIGHT));

endmodule
