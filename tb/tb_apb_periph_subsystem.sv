// tb_apb_periph_subsystem: the peripheral side of AXI slave 0, driven by APB transfers as
// the bridge makes them (SETUP, then ENABLE until PREADY), with a 3x3 keypad model on the
// column/row lines and the UART's output looped back to its input. Small sizes: scan
// divider 6, UART divisor 4 (64 cycles per bit).
//  - Keypad (0x04): press a key, read its value and the "new" flag.
//  - Display (0x08): write the key value, check seg and read it back.
//  - UART (0x0C/0x0D): send a byte, receive it through the loop, check status; a second
//    write while sending must see wait states.
//  - Unmapped offset 0x00 reads 0 without wait states.
module tb_apb_periph_subsystem;
  import amba_pkg::*;
  logic clk = 0, rst_n = 0;
  apb_req_t  req;
  apb_resp_t resp;
  logic [2:0] kp_col, kp_row;
  logic [6:0] seg;
  logic       txd;
  int press_r = -1, press_c = -1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  apb_periph_subsystem #(.CLK_HZ(64000), .BAUD(1000), .SCAN_DIV(6)) dut (
    .clk, .rst_n, .apb_req(req), .apb_resp(resp), .kp_col, .kp_row, .seg,
    .uart_txd(txd), .uart_rxd(txd)
  );

  always_comb begin
    kp_row = '0;
    if (press_r >= 0 && kp_col[press_c]) kp_row[press_r] = 1'b1;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic apb(input logic wr, input logic [31:0] a, input logic [31:0] wd,
                     output logic [31:0] rd, output int waits);
    waits = 0;
    @(negedge clk);
    req = '0; req.psel = 1; req.pwrite = wr; req.paddr = a; req.pwdata = wd; req.pstrb = wr ? 4'hF : 4'h0;
    @(negedge clk); req.penable = 1;
    #4;
    while (!resp.pready) begin waits++; @(negedge clk); #4; end
    rd = resp.prdata;
    @(negedge clk); req = '0;
  endtask

  // 7-segment shapes {a..g} of the digits 0-9.
  logic [6:0] digit_seg[10] = '{7'h7E, 7'h30, 7'h6D, 7'h79, 7'h33, 7'h5B, 7'h5F, 7'h70, 7'h7F, 7'h7B};

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    int w;
    req = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    apb(0, 32'h00, 0, d, w);
    check(d == 0 && w == 0, "unmapped read");
    for (int k = 0; k < 9; k++) begin
      automatic int r = k / 3, c = k % 3;
      press_r = r; press_c = c;
      repeat (30) @(posedge clk);
      press_r = -1;
      apb(0, 32'h04, 0, d, w);
      check(d == 32'(8'h80 | (k + 1)), $sformatf("keypad key %0d read %h", k + 1, d));
      apb(1, 32'h08, d & 32'h0F, d, w);
      check(seg == digit_seg[k + 1], $sformatf("display %0d seg %b", k + 1, seg));
      apb(0, 32'h08, 0, d, w);
      check(d == 32'(k + 1), "display readback");
    end
    apb(0, 32'h04, 0, d, w);
    check(d == 32'h09, "keypad new flag cleared");
    // UART
    apb(1, 32'h0C, 32'h0000_00A7, d, w);
    check(w == 0, "first UART write waited");
    apb(1, 32'h0C, 32'h0000_0042, d, w);
    check(w > 500, $sformatf("second UART write waited only %0d", w));
    repeat (700) @(posedge clk);
    apb(0, 32'h0D, 0, d, w);
    check(d == 32'h2, $sformatf("UART status %h", d));
    apb(0, 32'h0C, 0, d, w);
    check(d == 32'h42, $sformatf("UART data %h", d));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
