// apb_addr_decoder: picks the peripheral behind AXI slave 0 from the APB address.
//
// While the bridge's PSEL is high, PADDR[3:2] selects one of three peripherals:
// 1 -> PSEL1 (keypad decoder, 0x04), 2 -> PSEL2 (seven-segment decoder, 0x08),
// 3 -> PSEL3 (UART, 0x0C..0x0F). PADDR[3:2] = 0 selects nothing. The three select lines and
// their assignment to the peripherals follow the original description; the address map
// itself is this design's choice. Combinational; sel[0] is PSEL1.
module apb_addr_decoder
  import amba_pkg::*;
(
  input  logic               psel,
  input  logic [PADDR_W-1:0] paddr,
  output logic [2:0]         sel
);

  always_comb begin
    sel = '0;
    if (psel) begin
      unique case (paddr[3:2])
        PSEL_KEYPAD: sel[0] = 1'b1;
        PSEL_SEVSEG: sel[1] = 1'b1;
        PSEL_UART:   sel[2] = 1'b1;
        default:     ;
      endcase
    end
  end

endmodule
