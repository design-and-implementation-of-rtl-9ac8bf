// tb_axi_addr_decoder: checks the 2:4 AXI address decoder against the address map
// (ADDR[31:30] = slave index) for directed corner addresses and random ones, with valid low
// and high.
module tb_axi_addr_decoder;
  import amba_pkg::*;
  logic              valid;
  logic [ADDR_W-1:0] addr;
  logic [N_SLAVE-1:0] sel;
  int checks = 0, failures = 0;

  axi_addr_decoder dut (.valid, .addr, .sel);

  task automatic check(input logic v, input logic [31:0] a);
    logic [3:0] exp;
    valid = v; addr = a; #1;
    exp = 4'b0000;
    if (v) begin
      if (a < 32'h4000_0000)      exp = 4'b0001;
      else if (a < 32'h8000_0000) exp = 4'b0010;
      else if (a < 32'hC000_0000) exp = 4'b0100;
      else                        exp = 4'b1000;
    end
    checks++;
    if (sel !== exp) begin
      failures++;
      $display("FAIL valid=%0b addr=%h sel=%b exp=%b", v, a, sel, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(1, 32'h0000_0000); check(1, 32'h3FFF_FFFF); check(1, 32'h4000_0000);
    check(1, 32'h7FFF_FFFF); check(1, 32'h8000_0004); check(1, 32'hBFFF_FFFF);
    check(1, 32'hC000_0000); check(1, 32'hFFFF_FFFF); check(0, 32'h4000_0000);
    for (int i = 0; i < 200; i++) check(1'($urandom), $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
