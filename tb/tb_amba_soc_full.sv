// tb_amba_soc_full: one complete operation of the bus system at its default sizes
// (100 MHz clock, 115200 baud, keypad column scan every 100000 cycles). Master 0 waits for
// a key on the keypad model, shows its value on the seven-segment display, sends it as an
// ASCII digit through the UART (output looped back to input) and reads it back; it then
// writes and reads one word on each of the external APB buses of AXI slaves 1..3, which
// hold memory models with random wait states.
module tb_amba_soc_full;
  import amba_pkg::*;
  logic clk = 0, rst_n = 0;
  axi_req_t   m_req [4];
  axi_resp_t  m_resp[4];
  apb_req_t   ext_req [3];
  apb_resp_t  ext_resp[3];
  logic [2:0] kp_col, kp_row;
  logic [6:0] seg;
  logic       txd;
  logic       wait_en = 1;
  int press_r = -1, press_c = -1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  amba_soc_top dut (
    .aclk(clk), .aresetn(rst_n), .m_req, .m_resp, .ext_apb_req(ext_req), .ext_apb_resp(ext_resp),
    .kp_col, .kp_row, .seg, .uart_txd(txd), .uart_rxd(txd)
  );

  for (genvar s = 0; s < 3; s++) begin : g_ext
    apb_mem_slave u_mem (.clk, .wait_en, .req(ext_req[s]), .resp(ext_resp[s]));
  end

  always_comb begin
    kp_row = '0;
    if (press_r >= 0 && kp_col[press_c]) kp_row[press_r] = 1'b1;
  end

  `include "axi_master_tasks.svh"

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #20_000_000;   // 2 million cycles
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d, key;
    axi_resp_e e;
    for (int m = 0; m < 4; m++) m_req[m] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (2) @(posedge clk);

    press_r = 1; press_c = 1;   // key 5
    d = 0;
    while (!d[7]) begin
      axi_read(0, 32'h0000_0004, d, e);
      repeat (100) @(posedge clk);
    end
    press_r = -1;
    key = d & 32'h0F;
    check(key == 5, $sformatf("keypad value %0d", key));
    axi_write(0, 32'h0000_0008, key, e);
    check(e == RESP_OKAY && seg == 7'b1011011, $sformatf("display seg %b", seg));
    axi_write(0, 32'h0000_000C, 32'h30 + key, e);
    d = 0;
    while (!d[1]) begin
      axi_read(0, 32'h0000_000D, d, e);
      repeat (100) @(posedge clk);
    end
    axi_read(0, 32'h0000_000C, d, e);
    check(d == 32'h35, $sformatf("UART loopback %h", d));
    for (int s = 1; s < 4; s++) begin
      logic [31:0] a;
      a = {2'(s), 30'h40};
      axi_write(s, a, 32'h5A5A_0000 + 32'(s), e);
      axi_read(0, a, d, e);
      check(d == 32'h5A5A_0000 + 32'(s), $sformatf("slave %0d readback %h", s, d));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
