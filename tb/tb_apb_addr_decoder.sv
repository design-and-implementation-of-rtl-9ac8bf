// tb_apb_addr_decoder: checks the peripheral select lines for every 8-bit PADDR with PSEL
// high and low: 0x04-0x07 keypad, 0x08-0x0B display, 0x0C-0x0F UART, repeating every 16
// bytes, nothing for offsets 0x00-0x03 and nothing while PSEL is low.
module tb_apb_addr_decoder;
  logic       psel;
  logic [7:0] paddr;
  logic [2:0] sel;
  int checks = 0, failures = 0;

  apb_addr_decoder dut (.psel, .paddr, .sel);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 2; p++) begin
      for (int a = 0; a < 256; a++) begin
        logic [2:0] exp;
        psel = 1'(p); paddr = 8'(a); #1;
        case (a % 16)
          4, 5, 6, 7:     exp = 3'b001;
          8, 9, 10, 11:   exp = 3'b010;
          12, 13, 14, 15: exp = 3'b100;
          default:        exp = 3'b000;
        endcase
        if (p == 0) exp = 3'b000;
        checks++;
        if (sel !== exp) begin
          failures++;
          $display("FAIL psel=%0d paddr=%h sel=%b exp=%b", p, a, sel, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
