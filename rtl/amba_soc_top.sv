// amba_soc_top: four AXI masters and four AXI-to-APB bridges joined by an AXI interconnect,
// with a cluster of low-bandwidth peripherals behind the first bridge.
//
// The high-bandwidth side is AXI4-Lite: the four master ports (m_req/m_resp, master 0 has
// the highest priority) enter axi_interconnect, which sends each access to one of four AXI
// slaves by its address bits [31:30]. Every AXI slave is an axi_apb_bridge that replays the
// access as an APB transfer. Slave 0's APB bus feeds apb_periph_subsystem (keypad decoder,
// seven-segment decoder, UART); the APB buses of slaves 1..3 are brought out as ports
// (ext_apb_req/ext_apb_resp, index 0 = AXI slave 1) for peripherals outside this design.
//
// Address map: 0x0000_0000 + {0x04 keypad, 0x08 display, 0x0C/0x0D UART};
// 0x4000_0000, 0x8000_0000, 0xC000_0000: APB buses of AXI slaves 1, 2, 3.
// One clock: ACLK also clocks the APB side (PCLK), and ARESETn (active low, asynchronous)
// also resets it. An access to the peripherals takes 1 cycle in the interconnect, 1 in the
// bridge's holding register and the two APB cycles, plus any APB wait states.
module amba_soc_top
  import amba_pkg::*;
#(
  parameter int unsigned CLK_HZ   = 100000000,
  parameter int unsigned BAUD     = 115200,
  parameter int unsigned SCAN_DIV = 100000
) (
  input  logic       aclk,
  input  logic       aresetn,
  input  axi_req_t   m_req [N_MASTER],
  output axi_resp_t  m_resp[N_MASTER],
  output apb_req_t   ext_apb_req [N_SLAVE-1],
  input  apb_resp_t  ext_apb_resp[N_SLAVE-1],
  output logic [2:0] kp_col,
  input  logic [2:0] kp_row,
  output logic [6:0] seg,
  output logic       uart_txd,
  input  logic       uart_rxd
);

  axi_req_t  s_req [N_SLAVE];
  axi_resp_t s_resp[N_SLAVE];
  apb_req_t  apb_req [N_SLAVE];
  apb_resp_t apb_resp[N_SLAVE];

  axi_interconnect u_xbar (
    .clk(aclk), .rst_n(aresetn), .m_req, .m_resp, .s_req, .s_resp
  );

  for (genvar s = 0; s < N_SLAVE; s++) begin : g_bridge
    axi_apb_bridge u_bridge (
      .clk(aclk), .rst_n(aresetn),
      .axi_req(s_req[s]), .axi_resp(s_resp[s]),
      .apb_req(apb_req[s]), .apb_resp(apb_resp[s])
    );
  end

  apb_periph_subsystem #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .SCAN_DIV(SCAN_DIV)) u_periph (
    .clk(aclk), .rst_n(aresetn),
    .apb_req(apb_req[0]), .apb_resp(apb_resp[0]),
    .kp_col, .kp_row, .seg, .uart_txd, .uart_rxd
  );

  for (genvar s = 1; s < N_SLAVE; s++) begin : g_ext
    assign ext_apb_req[s-1] = apb_req[s];
    assign apb_resp[s]      = ext_apb_resp[s-1];
  end

endmodule
