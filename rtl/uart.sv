// uart: UART peripheral on the APB peripheral bus (PSEL3), with transmitter, receiver and
// baud rate generator.
//
// Registers (PADDR[1:0]):
//   offset 0, write: send PWDATA[7:0]. If the transmitter is still sending the previous byte,
//                    PREADY stays low (APB wait states) until it is free; the write then
//                    completes and the byte is sent.
//   offset 0, read : the last received byte; the read clears the receive flag.
//   offset 1, read : status {6'b0, rx_valid, tx_busy}.
// Writes to other offsets are accepted and ignored. The transmitter and receiver share the
// baud generator's 16x enable and run in the system clock domain; txd idles high. The three
// sub-modules follow the original description; registers, wait states and frame format are this
// design's choices.
module uart #(
  parameter int unsigned CLK_HZ = 100000000,
  parameter int unsigned BAUD   = 115200
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       psel,
  input  logic       penable,
  input  logic       pwrite,
  input  logic [1:0] paddr,
  input  logic [7:0] pwdata,
  output logic [7:0] prdata,
  output logic       pready,
  output logic       txd,
  input  logic       rxd
);

  logic       tick16;
  logic       tx_busy, tx_start;
  logic [7:0] rx_byte, rx_data_q;
  logic       rx_pulse, rx_valid_q;
  logic       wr_data, rd_data;

  uart_baud_gen #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_baud (.clk, .rst_n, .tick16);
  uart_tx u_tx (.clk, .rst_n, .tick16, .start(tx_start), .data(pwdata), .busy(tx_busy), .txd);
  uart_rx u_rx (.clk, .rst_n, .tick16, .rxd, .data(rx_byte), .valid(rx_pulse));

  assign wr_data  = psel && penable && pwrite && (paddr == 2'd0);
  assign rd_data  = psel && penable && !pwrite && (paddr == 2'd0);
  assign pready   = !(wr_data && tx_busy);
  assign tx_start = wr_data && !tx_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_data_q  <= '0;
      rx_valid_q <= 1'b0;
    end else begin
      if (rd_data) rx_valid_q <= 1'b0;
      if (rx_pulse) begin
        rx_data_q  <= rx_byte;
        rx_valid_q <= 1'b1;
      end
    end
  end

  always_comb begin
    unique case (paddr)
      2'd0:    prdata = rx_data_q;
      2'd1:    prdata = {6'b0, rx_valid_q, tx_busy};
      default: prdata = '0;
    endcase
  end

endmodule
