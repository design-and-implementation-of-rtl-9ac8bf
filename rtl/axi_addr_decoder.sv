// axi_addr_decoder: the 2:4 address decoder of the AXI interconnect.
//
// For one master's read or write address channel it turns a valid address into a one-hot
// select of the AXI slave that owns it. The two most significant address bits, ADDR[31:30],
// pick the slave, so each slave owns a 1 GiB quarter of the 32-bit address space
// (slave 0 at 0x0000_0000, slave 1 at 0x4000_0000, ...). The 2:4 decode of ARADDR/AWADDR
// is the interconnect's structure; the choice of the top two bits is this design's own.
// Purely combinational; sel is all zero while valid is low.
module axi_addr_decoder
  import amba_pkg::*;
(
  input  logic              valid,
  input  logic [ADDR_W-1:0] addr,
  output logic [N_SLAVE-1:0] sel
);

  always_comb begin
    sel = '0;
    if (valid) sel[axi_slave_of(addr)] = 1'b1;
  end

endmodule
