// amba_pkg: shared types and constants of the AXI4-Lite / APB4 bus system.
//
// The system has four AXI masters, a 4x4 AXI interconnect and four AXI slaves, each of which
// is an AXI-to-APB bridge. The channel structs below carry exactly the AXI and APB signals of
// the original system description (address, protection, data, strobe, response, valid/ready). AXI is
// used in its single-beat form: that description lists no length, burst or last signals. Address
// and data widths are 32 bits, the width of the addresses and data on the AXI side; the
// peripheral data bus behind slave 0 is 8 bits wide. Everything else here (response encoding,
// the peripheral address map) follows the AMBA conventions or is this design's own choice.
package amba_pkg;

  localparam int unsigned ADDR_W   = 32;
  localparam int unsigned DATA_W   = 32;
  localparam int unsigned STRB_W   = DATA_W / 8;
  localparam int unsigned N_MASTER = 4;
  localparam int unsigned N_SLAVE  = 4;

  // AXI response codes (AMBA encoding).
  typedef enum logic [1:0] {
    RESP_OKAY   = 2'b00,
    RESP_EXOKAY = 2'b01,
    RESP_SLVERR = 2'b10,
    RESP_DECERR = 2'b11
  } axi_resp_e;

  // One AXI4-Lite port seen from the master: everything the master drives ...
  typedef struct packed {
    logic              aw_valid;
    logic [ADDR_W-1:0] aw_addr;
    logic [2:0]        aw_prot;
    logic              w_valid;
    logic [DATA_W-1:0] w_data;
    logic [STRB_W-1:0] w_strb;
    logic              b_ready;
    logic              ar_valid;
    logic [ADDR_W-1:0] ar_addr;
    logic [2:0]        ar_prot;
    logic              r_ready;
  } axi_req_t;

  // ... and everything the slave drives.
  typedef struct packed {
    logic              aw_ready;
    logic              w_ready;
    logic              b_valid;
    axi_resp_e         b_resp;
    logic              ar_ready;
    logic              r_valid;
    logic [DATA_W-1:0] r_data;
    axi_resp_e         r_resp;
  } axi_resp_t;

  // APB4 master outputs (one select line per bridge) and slave returns.
  typedef struct packed {
    logic [ADDR_W-1:0] paddr;
    logic [2:0]        pprot;
    logic              psel;
    logic              penable;
    logic              pwrite;
    logic [DATA_W-1:0] pwdata;
    logic [STRB_W-1:0] pstrb;
  } apb_req_t;

  typedef struct packed {
    logic              pready;
    logic [DATA_W-1:0] prdata;
  } apb_resp_t;

  // The three states of the APB transfer.
  typedef enum logic [1:0] {
    APB_IDLE   = 2'd0,
    APB_SETUP  = 2'd1,
    APB_ENABLE = 2'd2
  } apb_state_e;

  // Peripheral bus behind AXI slave 0: 8-bit address and data.
  localparam int unsigned PADDR_W = 8;
  localparam int unsigned PDATA_W = 8;

  // Peripheral select numbers (PSEL1..PSEL3), decoded from PADDR[3:2].
  localparam logic [1:0] PSEL_KEYPAD = 2'd1;
  localparam logic [1:0] PSEL_SEVSEG = 2'd2;
  localparam logic [1:0] PSEL_UART   = 2'd3;

  // AXI slave index of an address: a 2:4 decode of the two top address bits.
  function automatic logic [1:0] axi_slave_of(input logic [ADDR_W-1:0] addr);
    return addr[ADDR_W-1 -: 2];
  endfunction

endpackage
