// opb_master_bfm: OPB master for testbenches. wr/rd drive one transfer
// (select, read-not-write, address, data from a falling edge) and wait for
// xfer_ack, then release the bus. Also flags read data on the bus while no
// slave acknowledges, which the OR-combined OPB read bus does not allow.
module opb_master_bfm
  import dips_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  output opb_m2s_t m,
  input  opb_s2m_t s
);
  int n_xfers = 0;
  int bus_errors = 0;
  logic last_err = 1'b0;   // err_ack of the last transfer

  initial m = '0;

  task automatic wr(logic [31:0] a, logic [31:0] d);
    @(negedge clk); m = '{select: 1'b1, rnw: 1'b0, abus: a, dbus: d};
    do @(posedge clk); while (!s.xfer_ack);
    last_err = s.err_ack;
    @(negedge clk); m = '0;
    n_xfers++;
  endtask

  task automatic rd(logic [31:0] a, output logic [31:0] d);
    @(negedge clk); m = '{select: 1'b1, rnw: 1'b1, abus: a, dbus: '0};
    do @(posedge clk); while (!s.xfer_ack);
    d = s.dbus;
    last_err = s.err_ack;
    @(negedge clk); m = '0;
    n_xfers++;
  endtask

  always @(posedge clk) if (rst_n && !s.xfer_ack && s.dbus != '0) bus_errors++;
endmodule
