// uart_tx: UART transmitter, 8 data bits, no parity, one stop bit.
//
// A start pulse while idle loads data and raises busy. The frame is a low start bit, the
// eight data bits least significant first and a high stop bit, each held for 16 ticks of the
// baud generator's tick16; txd idles high. busy falls after the stop bit, and a new start is
// accepted from the next cycle on. start is ignored while busy. The frame format is this
// design's choice.
module uart_tx (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick16,
  input  logic       start,
  input  logic [7:0] data,
  output logic       busy,
  output logic       txd
);

  logic [9:0] shreg;    // {stop, data[7:0], start}, shifted out LSB first
  logic [3:0] bit_idx;  // 0..9
  logic [3:0] sub;      // tick16 count within a bit

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      txd     <= 1'b1;
      shreg   <= '1;
      bit_idx <= '0;
      sub     <= '0;
    end else if (!busy) begin
      txd <= 1'b1;
      if (start) begin
        busy    <= 1'b1;
        shreg   <= {1'b1, data, 1'b0};
        bit_idx <= '0;
        sub     <= '0;
      end
    end else begin
      txd <= shreg[0];
      if (tick16) begin
        if (sub == 4'd15) begin
          sub   <= '0;
          shreg <= {1'b1, shreg[9:1]};
          if (bit_idx == 4'd9) begin
            busy <= 1'b0;
          end else begin
            bit_idx <= bit_idx + 4'd1;
          end
        end else begin
          sub <= sub + 4'd1;
        end
      end
    end
  end

endmodule
