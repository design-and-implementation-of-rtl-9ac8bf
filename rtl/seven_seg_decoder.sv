// seven_seg_decoder: seven-segment display register, written over APB on PSEL2.
//
// An APB write (PSEL2, PENABLE, PWRITE) stores PWDATA[7:0]; the display output seg shows the
// stored value's low nibble as a hexadecimal digit. seg = {a,b,c,d,e,f,g}, a segment lit when
// its bit is 1, so "0" is 7'b1111110. A read returns the stored byte. PREADY is always high.
// The output updates in the cycle after the ENABLE cycle of the write. Its use (showing the
// value read from the keypad) and the segment order follow the original description and its
// display-write example; the register and the A-F shapes are this design's choice.
module seven_seg_decoder (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       psel,
  input  logic       penable,
  input  logic       pwrite,
  input  logic [7:0] pwdata,
  output logic [7:0] prdata,
  output logic       pready,
  output logic [6:0] seg
);

  logic [7:0] value;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) value <= '0;
    else if (psel && penable && pwrite) value <= pwdata;
  end

  always_comb begin
    unique case (value[3:0])
      4'h0: seg = 7'b1111110;
      4'h1: seg = 7'b0110000;
      4'h2: seg = 7'b1101101;
      4'h3: seg = 7'b1111001;
      4'h4: seg = 7'b0110011;
      4'h5: seg = 7'b1011011;
      4'h6: seg = 7'b1011111;
      4'h7: seg = 7'b1110000;
      4'h8: seg = 7'b1111111;
      4'h9: seg = 7'b1111011;
      4'hA: seg = 7'b1110111;
      4'hB: seg = 7'b0011111;
      4'hC: seg = 7'b1001110;
      4'hD: seg = 7'b0111101;
      4'hE: seg = 7'b1001111;
      default: seg = 7'b1000111;  // F
    endcase
  end

  assign prdata = value;
  assign pready = 1'b1;

endmodule
