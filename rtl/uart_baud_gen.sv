// uart_baud_gen: baud rate generator of the UART.
//
// Counts system clock cycles and gives a one-cycle enable, tick16, every
// DIVISOR = CLK_HZ / (16*BAUD) cycles (rounded down): sixteen ticks per bit. The transmitter
// counts 16 ticks per bit; the receiver uses them to oversample its input. With the defaults
// (100 MHz, 115200 baud) DIVISOR is 54 and the bit rate is 0.5 % fast. Clock and baud rate
// are this design's choices; the UART's split into transmitter, receiver and baud rate
// generator follows the original description.
module uart_baud_gen #(
  parameter int unsigned CLK_HZ = 100000000,
  parameter int unsigned BAUD   = 115200
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick16
);

  localparam int unsigned DIVISOR = (CLK_HZ / (16 * BAUD) > 1) ? CLK_HZ / (16 * BAUD) : 2;
  localparam int unsigned CW      = $clog2(DIVISOR);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      tick16 <= 1'b0;
    end else begin
      tick16 <= (cnt == CW'(DIVISOR - 1));
      cnt    <= (cnt == CW'(DIVISOR - 1)) ? '0 : cnt + 1'b1;
    end
  end

endmodule
