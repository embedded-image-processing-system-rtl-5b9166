// sram_opb_model: behavioural model of the system's external image memory,
// a 256K x 32 SRAM behind its OPB memory controller, for testbenches. It
// answers any selected transfer LATENCY clocks after select with the word at
// abus[19:2] (reads) or stores dbus there (writes). Contents start at zero.
module sram_opb_model
  import dips_pkg::*;
#(
  parameter int unsigned WORDS   = 256 * 1024,
  parameter int unsigned LATENCY = 2
) (
  input  logic     clk,
  input  opb_m2s_t opb_i,
  output opb_s2m_t opb_o
);
  logic [31:0] mem [WORDS];
  int cnt = 0;

  initial begin
    opb_o = '0;
    foreach (mem[i]) mem[i] = '0;
  end

  always @(posedge clk) begin
    opb_o <= '0;
    if (!opb_i.select || opb_o.xfer_ack) cnt <= 0;
    else if (cnt == LATENCY - 1) begin
      opb_o.xfer_ack <= 1'b1;
      if (opb_i.rnw) opb_o.dbus <= mem[opb_i.abus[$clog2(WORDS)+1:2]];
      else           mem[opb_i.abus[$clog2(WORDS)+1:2]] <= opb_i.dbus;
      cnt <= 0;
    end else cnt <= cnt + 1;
  end
endmodule
