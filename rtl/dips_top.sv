// dips_top: the hardware side of DIPS, an FPGA image-processing system built
// around a 32-bit soft processor. The processor (with its local-memory BRAM,
// UART, GPIO, JTAG UART and SRAM controller) is not part of this RTL; its
// data-side OPB master port enters here, and the OPB window of the external
// peripherals leaves here, so the processor and those peripherals attach
// directly.
//
//   cpu_opb_i/o  --> opb_bus --+-- slave 0: dwt_opb  (5/3 wavelet IP core)  @ DWT_BASE
//                              +-- slave 1: img_opb  (3x3 filters, edges)   @ IMG_BASE
//                              +-- slave 2: ext_opb_o/i (UART, GPIO, SRAM..) @ EXT_BASE
//
// The wavelet core transforms one image line at a time; the processor builds
// the two-dimensional, multi-level transform from row and column passes. The
// image engine filters a raster-order pixel stream written through its data
// register. dwt_irq signals a finished line transform and can drive the
// processor's interrupt input. All ports are synchronous to clk; rst_n is an
// asynchronous active-low reset. Bus timing is that of the OPB slaves: the
// answer comes one clock after select (plus whatever an external slave
// needs), and an address outside all windows is answered with err_ack.
// The wavelet core as a bus peripheral follows the system description; doing
// the filters and edge detection in a bus peripheral as well (the processor
// otherwise runs them in software) and the address map are this design's
// choices.
module dips_top
  import dips_pkg::*;
#(
  parameter int unsigned IMG_MAX_WIDTH  = 512,
  parameter int unsigned IMG_MAX_HEIGHT = 512,
  parameter int unsigned DWT_MAXN       = 512,
  parameter int unsigned DWT_DW         = 16
) (
  input  logic     clk,
  input  logic     rst_n,
  // data-side OPB master (processor)
  input  opb_m2s_t cpu_opb_i,
  output opb_s2m_t cpu_opb_o,
  // OPB window of the peripherals outside this RTL
  output opb_m2s_t ext_opb_o,
  input  opb_s2m_t ext_opb_i,
  // interrupt request of the wavelet core
  output logic     dwt_irq
);

  opb_m2s_t [2:0] s_m2s;
  opb_s2m_t [2:0] s_s2m;

  opb_bus #(
    .NSLV (3),
    .BASE ({EXT_BASE, IMG_BASE, DWT_BASE}),
    .MASK ({EXT_MASK, IMG_MASK, DWT_MASK})
  ) u_bus (
    .clk, .rst_n,
    .m_i (cpu_opb_i),
    .m_o (cpu_opb_o),
    .s_o (s_m2s),
    .s_i (s_s2m)
  );

  dwt_opb #(.DW(DWT_DW), .MAXN(DWT_MAXN)) u_dwt (
    .clk, .rst_n,
    .opb_i (s_m2s[0]),
    .opb_o (s_s2m[0]),
    .irq   (dwt_irq)
  );

  img_opb #(.MAX_WIDTH(IMG_MAX_WIDTH), .MAX_HEIGHT(IMG_MAX_HEIGHT)) u_img (
    .clk, .rst_n,
    .opb_i (s_m2s[1]),
    .opb_o (s_s2m[1])
  );

  assign ext_opb_o = s_m2s[2];
  assign s_s2m[2]  = ext_opb_i;

endmodule
