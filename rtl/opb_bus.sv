// opb_bus: the data-side On-chip Peripheral Bus for one master (the
// processor's data port) and NSLV slaves.
//
// The master's request is broadcast to all slaves; only the slave whose
// address window (abus & MASK == BASE) matches sees select high. Slave
// responses are combined by OR, which is correct because an OPB slave drives
// zeros whenever it is not acknowledging. A request that matches no window
// is answered by the bus itself one clock later with xfer_ack and err_ack,
// so the master never hangs. Windows must not overlap.
// This is a minimal single-master stand-in for the vendor's OPB
// interconnect: no arbitration, no bus parking, no timeout counter; the
// address-window decode and error answer are this design's choices.
module opb_bus
  import dips_pkg::*;
#(
  parameter int unsigned NSLV = 3,
  parameter logic [NSLV-1:0][31:0] BASE = {EXT_BASE, IMG_BASE, DWT_BASE},
  parameter logic [NSLV-1:0][31:0] MASK = {EXT_MASK, IMG_MASK, DWT_MASK}
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  opb_m2s_t             m_i,
  output opb_s2m_t             m_o,
  output opb_m2s_t [NSLV-1:0]  s_o,
  input  opb_s2m_t [NSLV-1:0]  s_i
);

  logic [NSLV-1:0] hit;
  logic            miss_q;
  opb_s2m_t        resp;

  always_comb begin
    resp = '0;
    for (int i = 0; i < NSLV; i++) begin
      hit[i]           = (m_i.abus & MASK[i]) == BASE[i];
      s_o[i]           = m_i;
      s_o[i].select    = m_i.select && hit[i];
      resp.dbus       |= s_i[i].dbus;
      resp.xfer_ack   |= s_i[i].xfer_ack;
      resp.err_ack    |= s_i[i].err_ack;
    end
    resp.xfer_ack |= miss_q;
    resp.err_ack  |= miss_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) miss_q <= 1'b0;
    else        miss_q <= m_i.select && (hit == '0) && !miss_q;
  end

  assign m_o = resp;

  a_one_slave: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(hit));

endmodule
