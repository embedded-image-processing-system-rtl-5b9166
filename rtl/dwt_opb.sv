// dwt_opb: the wavelet-transform peripheral, a dwt53_core behind an OPB slave
// port, so the processor can hand whole image lines to hardware instead of
// computing the lifting steps in software.
//
// Register map (byte offsets from the peripheral base):
//   0x0000 W  CTRL   bit0 start (ignored while busy), bit1 inverse mode
//          R  STATUS bit0 busy, bit1 done (sticky, cleared by start),
//                    bit2 inverse mode
//   0x0004 RW LEN    line length N, even, 4..MAXN
//   0x1000 + 4*i     line buffer entry i, sign-extended on read
// The line buffer is seen by the host in subband order on the transformed
// side: in forward mode the host writes samples in natural order and reads
// the N/2 low-pass coefficients followed by the N/2 high-pass ones; in inverse
// mode it writes low-pass then high-pass coefficients and reads samples in
// natural order. A two-dimensional, multi-level transform is built by the
// processor from row and column passes of this one-dimensional engine.
//
// Bus timing: a slave selected in cycle t answers with xfer_ack (and read
// data) in cycle t+1; a write takes effect at the same clock edge that raises
// the acknowledge. irq follows the sticky done bit. The register layout,
// subband ordering and interrupt are this design's own choices; the original
// system description only states that the transform is an IP core on the
// CoreConnect (OPB) bus.
module dwt_opb
  import dips_pkg::*;
#(
  parameter int unsigned DW   = 16,
  parameter int unsigned MAXN = 512,
  localparam int unsigned AW  = $clog2(MAXN)
) (
  input  logic     clk,
  input  logic     rst_n,
  input  opb_m2s_t opb_i,
  output opb_s2m_t opb_o,
  output logic     irq
);

  logic                 ack_q;
  logic [31:0]          rdata_q;
  logic                 inv_q, done_q;
  logic [AW:0]          len_q;

  logic                 core_we, core_start, core_busy, core_done;
  logic [AW-1:0]        core_addr;
  logic signed [DW-1:0] core_rdata;

  logic        access, is_buf, is_ctrl, is_len;
  logic [AW-1:0] idx, half, sub_idx;
  logic        to_subband;

  assign access  = opb_i.select && !ack_q;
  assign is_buf  = opb_i.abus[DWT_BUF_BIT];
  assign is_ctrl = !is_buf && opb_i.abus[3:2] == 2'd0;
  assign is_len  = !is_buf && opb_i.abus[3:2] == 2'd1;
  assign idx     = opb_i.abus[AW+1:2];
  assign half    = AW'(len_q >> 1);

  // Position in the interleaved buffer of host index idx in subband order.
  always_comb begin
    if (idx < half) sub_idx = AW'({idx, 1'b0});
    else            sub_idx = AW'({idx - half, 1'b1});
    // Subband order applies to reads in forward mode and writes in inverse mode.
    to_subband = opb_i.rnw ? !inv_q : inv_q;
    core_addr  = to_subband ? sub_idx : idx;
    core_we    = access && !opb_i.rnw && is_buf;
    core_start = access && !opb_i.rnw && is_ctrl && opb_i.dbus[0] && !core_busy;
  end

  dwt53_core #(.DW(DW), .MAXN(MAXN)) u_core (
    .clk, .rst_n,
    .we      (core_we),
    .addr    (core_addr),
    .wdata   (DW'(opb_i.dbus)),
    .rdata   (core_rdata),
    .start   (core_start),
    .inverse (inv_q),
    .len     (len_q),
    .busy    (core_busy),
    .done    (core_done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack_q   <= 1'b0;
      rdata_q <= '0;
      inv_q   <= 1'b0;
      done_q  <= 1'b0;
      len_q   <= (AW+1)'(MAXN);
    end else begin
      ack_q   <= access;
      rdata_q <= '0;
      if (core_done) done_q <= 1'b1;
      if (access && !opb_i.rnw) begin
        if (is_ctrl && !core_busy) begin
          inv_q <= opb_i.dbus[1];
          if (opb_i.dbus[0]) done_q <= 1'b0;
        end
        if (is_len && !core_busy) len_q <= opb_i.dbus[AW:0];
      end
      if (access && opb_i.rnw) begin
        if (is_buf)       rdata_q <= 32'(core_rdata);           // sign-extended
        else if (is_ctrl) rdata_q <= {29'd0, inv_q, done_q | core_done, core_busy};
        else if (is_len)  rdata_q <= 32'(len_q);
      end
    end
  end

  assign opb_o.xfer_ack = ack_q;
  assign opb_o.dbus     = ack_q ? rdata_q : '0;
  assign opb_o.err_ack  = 1'b0;
  assign irq            = done_q;

  a_ack_needs_select: assert property (@(posedge clk) disable iff (!rst_n) ack_q |-> $past(opb_i.select));

endmodule
