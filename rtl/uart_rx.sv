// uart_rx: UART receiver with 16x oversampling, 8 data bits, no parity, one stop bit.
//
// rxd passes a two-flop synchroniser. In idle, the first low sample on a tick16 after the
// line has been seen high starts a frame (so a frame with a low stop bit cannot restart at
// once); 8 ticks later (the middle of the start bit) the line must still be low, otherwise
// the start is taken as a glitch. From there every 16 ticks sample the middle of the next
// bit: eight data bits, least significant first, then the stop bit. If the stop bit is high,
// data is updated and valid pulses for one cycle; a low stop bit drops the frame. The frame
// format and the error handling are this design's choices.
module uart_rx (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick16,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid
);

  typedef enum logic [1:0] {RX_IDLE, RX_START, RX_DATA, RX_STOP} rx_state_e;

  rx_state_e  state;
  logic       rx_s1, rx_s2;
  logic       armed;    // line seen high since the last frame
  logic [3:0] sub;
  logic [2:0] bit_idx;
  logic [7:0] shreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_s1   <= 1'b1;
      rx_s2   <= 1'b1;
      armed   <= 1'b0;
      state   <= RX_IDLE;
      sub     <= '0;
      bit_idx <= '0;
      shreg   <= '0;
      data    <= '0;
      valid   <= 1'b0;
    end else begin
      rx_s1 <= rxd;
      rx_s2 <= rx_s1;
      valid <= 1'b0;
      if (tick16) begin
        unique case (state)
          RX_IDLE: begin
            sub <= '0;
            if (rx_s2) armed <= 1'b1;
            else if (armed) begin
              armed <= 1'b0;
              state <= RX_START;
            end
          end
          RX_START: begin
            if (sub == 4'd7) begin
              sub     <= '0;
              bit_idx <= '0;
              state   <= rx_s2 ? RX_IDLE : RX_DATA;
            end else begin
              sub <= sub + 4'd1;
            end
          end
          RX_DATA: begin
            if (sub == 4'd15) begin
              sub   <= '0;
              shreg <= {rx_s2, shreg[7:1]};
              if (bit_idx == 3'd7) state <= RX_STOP;
              else bit_idx <= bit_idx + 3'd1;
            end else begin
              sub <= sub + 4'd1;
            end
          end
          RX_STOP: begin
            if (sub == 4'd15) begin
              sub   <= '0;
              state <= RX_IDLE;
              if (rx_s2) begin
                data  <= shreg;
                valid <= 1'b1;
              end
            end else begin
              sub <= sub + 4'd1;
            end
          end
          default: state <= RX_IDLE;
        endcase
      end
    end
  end

endmodule
