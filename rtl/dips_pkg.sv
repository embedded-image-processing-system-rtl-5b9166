// dips_pkg: types and constants shared by the DIPS image-processing
// peripherals.
//
// The peripherals hang off a simplified On-chip Peripheral Bus (OPB): a
// single master drives select, read-not-write, a 32-bit address and 32-bit
// write data, and holds them until the addressed slave pulses xfer_ack for
// one cycle. Slaves drive all-zero read data when they are not acknowledging,
// so the bus combines slave outputs with a plain OR, as OPB does. Retry,
// timeout-suppress and byte enables of the full OPB standard are not modelled.
//
// The filter modes follow the list of 3x3 operators of the system: smoothing
// (low-pass), high-pass, high-boost, Sobel, Prewitt, plus the max-difference
// edge detector. The numeric codes of the control byte are this design's own.
package dips_pkg;

  typedef struct packed {
    logic        select;
    logic        rnw;      // 1 = read, 0 = write
    logic [31:0] abus;
    logic [31:0] dbus;     // write data
  } opb_m2s_t;

  typedef struct packed {
    logic [31:0] dbus;     // read data, zero unless xfer_ack
    logic        xfer_ack;
    logic        err_ack;
  } opb_s2m_t;

  localparam opb_s2m_t OPB_S2M_IDLE = '{dbus: '0, xfer_ack: 1'b0, err_ack: 1'b0};

  // Control byte selecting the operation of the image engine.
  typedef enum logic [7:0] {
    MODE_LOWPASS   = 8'd0,
    MODE_HIGHPASS  = 8'd1,
    MODE_HIGHBOOST = 8'd2,
    MODE_SOBEL     = 8'd3,
    MODE_PREWITT   = 8'd4,
    MODE_EDGE      = 8'd5
  } img_mode_e;

  // A 3x3 neighbourhood of 8-bit pixels, indexed [row][col], row 0 on top.
  typedef logic [2:0][2:0][7:0] win3_t;

  // Address map of the peripherals on the data-side OPB.
  localparam logic [31:0] DWT_BASE = 32'h4000_0000;
  localparam logic [31:0] DWT_MASK = 32'hFFFF_0000;
  localparam logic [31:0] IMG_BASE = 32'h4001_0000;
  localparam logic [31:0] IMG_MASK = 32'hFFFF_0000;
  // Everything in the upper half of the address space belongs to the
  // peripherals outside this RTL (UART, GPIO, JTAG UART, SRAM controller).
  localparam logic [31:0] EXT_BASE = 32'h8000_0000;
  localparam logic [31:0] EXT_MASK = 32'h8000_0000;

  // Register offsets of the wavelet core.
  localparam logic [15:0] DWT_REG_CTRL = 16'h0000;  // W: bit0 start, bit1 inverse; R: status
  localparam logic [15:0] DWT_REG_LEN  = 16'h0004;  // line length N (even)
  localparam int unsigned DWT_BUF_BIT  = 12;        // offsets with bit 12 set address the line buffer

  // Register offsets of the image engine.
  localparam logic [15:0] IMG_REG_CTRL = 16'h0000;  // [7:0] mode, [15:8] threshold, [23:16] boost weight
  localparam logic [15:0] IMG_REG_DIN  = 16'h0004;  // W: push one pixel
  localparam logic [15:0] IMG_REG_DOUT = 16'h0008;  // R: bit31 valid, [7:0] pixel (pops)
  localparam logic [15:0] IMG_REG_STAT = 16'h000C;  // R: bit0 in_ready, bit1 out_valid, bit2 overrun
  localparam logic [15:0] IMG_REG_SIZE = 16'h0010;  // RW: [15:0] width, [31:16] height

endpackage
