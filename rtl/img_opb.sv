// img_opb: the filter / edge-detection peripheral, an img_engine behind an
// OPB slave port. The processor streams an image through it pixel by pixel.
//
// Register map (byte offsets from the peripheral base):
//   0x0 RW CTRL  [7:0] mode (control byte), [15:8] edge threshold,
//                [23:16] high-boost weight w; writing bit31 = 1 restarts the
//                frame (clears the engine's position and pending output)
//   0x4 W  DIN   [7:0] next input pixel, raster order
//   0x8 R  DOUT  bit31 valid, bit30 last pixel of frame, [7:0] output pixel;
//                a read that returns valid removes the pixel
//   0xC R  STAT  bit0 engine can accept a pixel, bit1 output pixel waiting,
//                bit2 overrun (a DIN write was dropped; cleared by this read)
//   0x10 RW SIZE [15:0] image width, [31:16] image height (3..MAX_WIDTH,
//                3..MAX_HEIGHT; reset value MAX_WIDTH x MAX_HEIGHT)
// A DIN write is always acknowledged; if the engine cannot take the pixel
// (its output slot is full or it is draining the frame border) the pixel is
// dropped and the overrun flag is set. The intended software loop is: write
// one pixel, read DOUT until it stops returning valid, repeat; after the last
// pixel keep reading until the last-pixel flag is seen.
// Bus timing as in dwt_opb: acknowledge one clock after select, write and
// pop effects at the acknowledging edge. Register layout, reset values
// (low-pass, threshold 0, w = 9) and the drop-on-overrun policy are this
// design's choices.
module img_opb
  import dips_pkg::*;
#(
  parameter int unsigned MAX_WIDTH  = 512,
  parameter int unsigned MAX_HEIGHT = 512,
  localparam int unsigned CW        = $clog2(MAX_WIDTH),
  localparam int unsigned RW        = $clog2(MAX_HEIGHT)
) (
  input  logic     clk,
  input  logic     rst_n,
  input  opb_m2s_t opb_i,
  output opb_s2m_t opb_o
);

  logic        ack_q;
  logic [31:0] rdata_q;
  img_mode_e   mode_q;
  logic [7:0]  thr_q, weight_q;
  logic        overrun_q;
  logic [CW:0] width_q;
  logic [RW:0] height_q;

  logic        access, wr, rd;
  logic [2:0]  reg_sel;
  logic        clr, in_valid, in_ready, out_valid, out_ready, out_last;
  logic [7:0]  out_data;

  assign access    = opb_i.select && !ack_q;
  assign wr        = access && !opb_i.rnw;
  assign rd        = access && opb_i.rnw;
  assign reg_sel   = opb_i.abus[4:2];
  assign clr       = wr && reg_sel == 3'd0 && opb_i.dbus[31];
  assign in_valid  = wr && reg_sel == 3'd1;
  assign out_ready = rd && reg_sel == 3'd2;

  img_engine #(.MAX_WIDTH(MAX_WIDTH), .MAX_HEIGHT(MAX_HEIGHT)) u_engine (
    .clk, .rst_n, .clr,
    .width     (width_q),
    .height    (height_q),
    .mode      (mode_q),
    .threshold (thr_q),
    .weight    (weight_q),
    .in_valid,
    .in_ready,
    .in_data   (opb_i.dbus[7:0]),
    .out_valid,
    .out_ready,
    .out_data,
    .out_last
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack_q     <= 1'b0;
      rdata_q   <= '0;
      mode_q    <= MODE_LOWPASS;
      thr_q     <= 8'd0;
      weight_q  <= 8'd9;
      overrun_q <= 1'b0;
      width_q   <= (CW+1)'(MAX_WIDTH);
      height_q  <= (RW+1)'(MAX_HEIGHT);
    end else begin
      ack_q   <= access;
      rdata_q <= '0;
      if (wr && reg_sel == 3'd0) begin
        mode_q   <= img_mode_e'(opb_i.dbus[7:0]);
        thr_q    <= opb_i.dbus[15:8];
        weight_q <= opb_i.dbus[23:16];
      end
      if (wr && reg_sel == 3'd4) begin
        width_q  <= opb_i.dbus[CW:0];
        height_q <= opb_i.dbus[16+RW:16];
      end
      if (in_valid && !in_ready) overrun_q <= 1'b1;
      if (rd) begin
        unique case (reg_sel)
          3'd0: rdata_q <= {8'd0, weight_q, thr_q, 8'(mode_q)};
          3'd1: rdata_q <= '0;
          3'd2: rdata_q <= {out_valid, out_last, 22'd0, out_valid ? out_data : 8'd0};
          3'd3: begin
            rdata_q   <= {29'd0, overrun_q, out_valid, in_ready};
            overrun_q <= in_valid && !in_ready;
          end
          3'd4: rdata_q <= {16'(height_q), 16'(width_q)};
          default: rdata_q <= '0;
        endcase
      end
    end
  end

  assign opb_o.xfer_ack = ack_q;
  assign opb_o.dbus     = ack_q ? rdata_q : '0;
  assign opb_o.err_ack  = 1'b0;

  a_ack_needs_select: assert property (@(posedge clk) disable iff (!rst_n) ack_q |-> $past(opb_i.select));

endmodule
