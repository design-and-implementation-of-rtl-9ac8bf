// apb_periph_subsystem: the low-bandwidth peripheral side of AXI slave 0.
//
// The APB transfer from slave 0's bridge enters the APB controller, which uses the address
// decoder to raise one of PSEL1 (keypad decoder), PSEL2 (seven-segment decoder) or PSEL3
// (UART) and passes PENABLE, PWRITE, PADDR[7:0] and PWDATA[7:0] to all three on an 8-bit
// peripheral bus; the selected peripheral's PRDATA and PREADY return to the bridge. A clock
// divider paces the keypad column scan. Register map (byte addresses inside AXI slave 0):
//   0x04 keypad   read  {new, 000, key value 1..9}
//   0x08 display  write value shown on seg, read it back
//   0x0C UART     write byte to send, read last received byte
//   0x0D UART     read  status {000000, rx_valid, tx_busy}
// Everything runs on the one system clock. The set of blocks and their select lines follow
// the original description; the address map and the divider's use are this design's.
module apb_periph_subsystem
  import amba_pkg::*;
#(
  parameter int unsigned CLK_HZ   = 100000000,
  parameter int unsigned BAUD     = 115200,
  parameter int unsigned SCAN_DIV = 100000
) (
  input  logic      clk,
  input  logic      rst_n,
  input  apb_req_t  apb_req,
  output apb_resp_t apb_resp,
  output logic [2:0] kp_col,
  input  logic [2:0] kp_row,
  output logic [6:0] seg,
  output logic       uart_txd,
  input  logic       uart_rxd
);

  logic [2:0]         psel;
  logic               penable, pwrite;
  logic [PADDR_W-1:0] paddr;
  logic [PDATA_W-1:0] pwdata;
  logic [PDATA_W-1:0] prdata[3];
  logic [2:0]         pready;
  logic               scan_tick;

  apb_controller u_ctrl (
    .apb_req, .apb_resp, .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready
  );

  clock_divider #(.DIV(SCAN_DIV)) u_div (.clk, .rst_n, .tick(scan_tick));

  keypad_decoder u_keypad (
    .clk, .rst_n, .scan_tick, .col(kp_col), .row(kp_row),
    .psel(psel[0]), .penable, .pwrite, .prdata(prdata[0]), .pready(pready[0])
  );

  seven_seg_decoder u_sevseg (
    .clk, .rst_n, .psel(psel[1]), .penable, .pwrite, .pwdata,
    .prdata(prdata[1]), .pready(pready[1]), .seg
  );

  uart #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_uart (
    .clk, .rst_n, .psel(psel[2]), .penable, .pwrite, .paddr(paddr[1:0]), .pwdata,
    .prdata(prdata[2]), .pready(pready[2]), .txd(uart_txd), .rxd(uart_rxd)
  );

endmodule
