// clock_divider: divides the system clock into a slow enable.
//
// A counter runs from 0 to DIV-1 and tick is high for one clock cycle each time it wraps, so
// tick has the frequency CLK/DIV. Logic that should run on the divided clock keeps the system
// clock and uses tick as its enable; the whole design stays in one clock domain. In this
// design the tick paces the keypad column scan. DIV = 100000 (1 kHz at a 100 MHz clock) is
// this design's choice; the original description names the divider but gives no ratio. DIV >= 2.
module clock_divider #(
  parameter int unsigned DIV = 100000
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);

  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else begin
      tick <= (cnt == CW'(DIV - 1));
      cnt  <= (cnt == CW'(DIV - 1)) ? '0 : cnt + 1'b1;
    end
  end

endmodule
