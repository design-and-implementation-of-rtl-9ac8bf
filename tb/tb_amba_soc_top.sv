// tb_amba_soc_top: the whole bus system end to end, at small sizes (keypad scan divider 6,
// UART divisor 4). Four bus-functional AXI masters; APB memory models with random wait
// states on the external APB buses of AXI slaves 1..3; a 3x3 keypad model; UART output
// looped back to its input.
//  A. Master 0 reads the pressed key from the keypad, writes it to the seven-segment display,
//     sends it through the UART and reads it back (the paper's three demonstrations).
//  B. Master 1 writes and master 2 reads the same AXI slave at once (the bridge must take
//     the read first), repeated on slaves 1..3.
//  C. All four masters read AXI slave 1 in the same cycle: the APB side must see them in
//     priority order 0, 1, 2, 3.
//  D. All four masters run random writes and read-backs over slaves 1..3 in parallel.
// Each mechanism is counted and a mechanism that never happened counts as a failure:
// arbitration conflicts, read-before-write, ENABLE-to-SETUP back-to-back transfers, APB wait
// states, keypad reads, display writes, UART frames received, UART write wait states.
module tb_amba_soc_top;
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

  amba_soc_top #(.CLK_HZ(64000), .BAUD(1000), .SCAN_DIV(6)) dut (
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

  // ---- Mechanism counters -------------------------------------------------------------
  int n_conflict = 0, n_read_first = 0, n_b2b = 0, n_apb_wait = 0;
  int n_uart_rx = 0, n_uart_wait = 0, n_kp_read = 0, n_disp_write = 0;
  apb_req_t prev_apb[4];
  logic [31:0] s1_order[$];

  always @(posedge clk) if (rst_n) begin
    // Two or more masters asking for the same slave in the same cycle.
    for (int s = 0; s < 4; s++) begin
      int n = 0;
      for (int m = 0; m < 4; m++) begin
        if (m_req[m].ar_valid && m_req[m].ar_addr[31:30] == 2'(s)) n++;
      end
      if (n > 1) n_conflict++;
    end
    for (int s = 0; s < 4; s++) begin
      apb_req_t a;
      logic rdy;
      a = (s == 0) ? dut.apb_req[0] : ext_req[s - 1];
      rdy = (s == 0) ? dut.apb_resp[0].pready : ext_resp[s - 1].pready;
      if (prev_apb[s].psel && prev_apb[s].penable && a.psel && !a.penable) n_b2b++;
      if (a.psel && a.penable && !rdy) n_apb_wait++;
      if (s == 1 && a.psel && !a.penable && !a.pwrite) s1_order.push_back(a.paddr);
      prev_apb[s] <= a;
    end
    if (dut.u_periph.psel[0] && dut.u_periph.penable && !dut.u_periph.pwrite) n_kp_read++;
    if (dut.u_periph.psel[1] && dut.u_periph.penable && dut.u_periph.pwrite) n_disp_write++;
    if (dut.u_periph.psel[2] && dut.u_periph.penable && !dut.u_periph.pready[2]) n_uart_wait++;
    if (dut.u_periph.u_uart.rx_pulse) n_uart_rx++;
  end

  // Read chosen while a complete write was also waiting at a bridge.
  for (genvar s = 0; s < 4; s++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      if ((dut.g_bridge[s].u_bridge.state == APB_IDLE || dut.g_bridge[s].u_bridge.ending) &&
          dut.g_bridge[s].u_bridge.rd_ok && dut.g_bridge[s].u_bridge.aw_pend && dut.g_bridge[s].u_bridge.w_pend &&
          !dut.g_bridge[s].u_bridge.b_valid_q)
        n_read_first++;
    end
  end

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] model [logic [31:0]];

  function automatic logic [31:0] expect_ext(input logic [31:0] a);
    return model.exists(a) ? model[a] : ~a;
  endfunction

  initial begin
    logic [31:0] d, key;
    axi_resp_e e;
    for (int m = 0; m < 4; m++) m_req[m] = '0;
    for (int s = 0; s < 4; s++) prev_apb[s] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (2) @(posedge clk);

    // ---- A. keypad -> display -> UART ----
    for (int k = 0; k < 9; k += 4) begin
      press_r = k / 3; press_c = k % 3;
      d = 0;
      while (!d[7]) axi_read(0, 32'h0000_0004, d, e);
      press_r = -1;
      key = d & 32'h0F;
      check(key == 32'(k + 1), $sformatf("keypad value %0d, pressed %0d", key, k + 1));
      axi_write(0, 32'h0000_0008, key, e);
      check(e == RESP_OKAY, "display write response");
      axi_read(0, 32'h0000_0008, d, e);
      check(d == key, "display readback");
      axi_write(0, 32'h0000_000C, 32'h30 + key, e);   // ASCII digit
      axi_write(0, 32'h0000_000C, 32'h40 + key, e);   // second byte waits for the first
      d = 0;
      while (!d[1]) axi_read(0, 32'h0000_000D, d, e);
      axi_read(0, 32'h0000_000C, d, e);
      // The first byte was overwritten in the receive register by the time it is polled
      // only if the second arrived; poll until the second byte is there.
      while (d != 32'h40 + key) begin
        d = 0;
        while (!d[1]) axi_read(0, 32'h0000_000D, d, e);
        axi_read(0, 32'h0000_000C, d, e);
      end
      check(d == 32'h40 + key, $sformatf("UART loopback %h", d));
    end
    check(seg == 7'b1111011, $sformatf("display should show 9, seg=%b", seg));

    // ---- B. read and write meet at one bridge ----
    for (int s = 1; s < 4; s++) begin
      logic [31:0] a;
      a = {2'(s), 30'h100};
      fork
        begin
          axi_resp_e e1;
          axi_write(1, a + 4, 32'hA000_0000 + 32'(s), e1);
        end
        begin
          logic [31:0] d2;
          axi_resp_e e2;
          axi_read(2, a, d2, e2);
          check(d2 == ~a, "read meeting a write");
        end
      join
      model[a + 4] = 32'hA000_0000 + 32'(s);
    end

    // ---- C. four masters read slave 1 together ----
    s1_order.delete();
    fork
      begin logic [31:0] x; axi_resp_e y; axi_read(3, 32'h4000_0030, x, y); end
      begin logic [31:0] x; axi_resp_e y; axi_read(2, 32'h4000_0020, x, y); end
      begin logic [31:0] x; axi_resp_e y; axi_read(1, 32'h4000_0010, x, y); end
      begin logic [31:0] x; axi_resp_e y; axi_read(0, 32'h4000_0000, x, y); end
    join
    check(s1_order.size() == 4, "slave 1 transfer count");
    for (int m = 0; m < 4 && m < s1_order.size(); m++)
      check(s1_order[m] == 32'h4000_0000 + 32'(16 * m), $sformatf("priority order %0d: %h", m, s1_order[m]));

    // ---- D. random parallel traffic over slaves 1..3 ----
    for (int mm = 0; mm < 4; mm++) begin
      automatic int m = mm;
      fork
        for (int k = 0; k < 30; k++) begin
          automatic logic [31:0] a, w, r;
          automatic axi_resp_e e3;
          a = {2'($urandom_range(1, 3)), 20'h0, 2'(m), 6'($urandom % 8), 2'b00};
          w = $urandom;
          axi_write(m, a, w, e3);
          model[a] = w;
          axi_read(m, a, r, e3);
          check(r == w, $sformatf("m%0d %h read %h wrote %h", m, a, r, w));
        end
      join_none
    end
    wait fork;

    // ---- mechanism coverage ----
    $display("conflicts=%0d read_first=%0d b2b=%0d apb_wait=%0d kp_reads=%0d disp_writes=%0d uart_rx=%0d uart_wait=%0d",
             n_conflict, n_read_first, n_b2b, n_apb_wait, n_kp_read, n_disp_write, n_uart_rx, n_uart_wait);
    check(n_conflict > 0, "no arbitration conflict");
    check(n_read_first > 0, "read-before-write never happened");
    check(n_b2b > 0, "no ENABLE-to-SETUP transfer");
    check(n_apb_wait > 0, "no APB wait state");
    check(n_kp_read > 0, "no keypad read");
    check(n_disp_write > 0, "no display write");
    check(n_uart_rx >= 6, "UART frames missing");
    check(n_uart_wait > 0, "no UART wait state");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
