// tb_axi_interconnect: four bus-functional masters and four memory slave models on the
// interconnect.
//  1. All four masters read from slave 2 in the same cycle: the slave must see the reads in
//     the order master 0, 1, 2, 3 (fixed priority), and each master must get its own data.
//  2. Same with writes to slave 1.
//  3. Each master in parallel writes and reads back random words spread over all four
//     slaves; every read must return the value that master wrote, and each slave must
//     see exactly the addresses in its quarter of the address map.
module tb_axi_interconnect;
  import amba_pkg::*;
  logic clk = 0, rst_n = 0;
  axi_req_t  m_req [4];
  axi_resp_t m_resp[4];
  axi_req_t  s_req [4];
  axi_resp_t s_resp[4];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  axi_interconnect dut (.clk, .rst_n, .m_req, .m_resp, .s_req, .s_resp);

  for (genvar s = 0; s < 4; s++) begin : g_s
    axi_mem_slave #(.ID(s)) u (.clk, .rst_n, .req(s_req[s]), .resp(s_resp[s]));
  end

  `include "axi_master_tasks.svh"

  // Addresses each slave accepts, in order.
  logic [31:0] rd_log[4][$], wr_log[4][$];
  always @(posedge clk) if (rst_n) begin
    for (int s = 0; s < 4; s++) begin
      if (s_req[s].ar_valid && s_resp[s].ar_ready) rd_log[s].push_back(s_req[s].ar_addr);
      if (s_req[s].aw_valid && s_resp[s].aw_ready) wr_log[s].push_back(s_req[s].aw_addr);
    end
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] rd_data[4];
  axi_resp_e   rsp[4];

  initial begin
    for (int m = 0; m < 4; m++) m_req[m] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (2) @(posedge clk);

    // 1. Read priority at slave 2.
    fork
      axi_read(0, 32'h8000_0000, rd_data[0], rsp[0]);
      axi_read(1, 32'h8000_0010, rd_data[1], rsp[1]);
      axi_read(2, 32'h8000_0020, rd_data[2], rsp[2]);
      axi_read(3, 32'h8000_0030, rd_data[3], rsp[3]);
    join
    check(rd_log[2].size() == 4, "slave 2 read count");
    for (int m = 0; m < 4; m++) begin
      check(rd_log[2][m] == 32'h8000_0000 + 32'(16 * m), $sformatf("read grant %0d went to %h", m, rd_log[2][m]));
      check(rd_data[m] == {4'd2, 28'(16 * m)} && rsp[m] == RESP_OKAY, $sformatf("master %0d read data %h", m, rd_data[m]));
    end

    // 2. Write priority at slave 1.
    fork
      axi_write(3, 32'h4000_0300, 32'h3333_0000, rsp[3]);
      axi_write(2, 32'h4000_0200, 32'h2222_0000, rsp[2]);
      axi_write(1, 32'h4000_0100, 32'h1111_0000, rsp[1]);
      axi_write(0, 32'h4000_0000, 32'h0000_0000, rsp[0]);
    join
    check(wr_log[1].size() == 4, "slave 1 write count");
    for (int m = 0; m < 4; m++)
      check(wr_log[1][m] == 32'h4000_0000 + 32'(256 * m), $sformatf("write grant %0d went to %h", m, wr_log[1][m]));

    // 3. Parallel random traffic.
    for (int s = 0; s < 4; s++) begin rd_log[s].delete(); wr_log[s].delete(); end
    for (int mm = 0; mm < 4; mm++) begin
      automatic int m = mm;
      fork
        begin
          for (int k = 0; k < 40; k++) begin
            automatic logic [31:0] a, d, r;
            automatic axi_resp_e e;
            a = {2'($urandom), 18'h0, 2'(m), 8'(k), 2'b00};
            d = $urandom;
            axi_write(m, a, d, e);
            check(e == RESP_OKAY, "write response");
            axi_read(m, a, r, e);
            check(r == d && e == RESP_OKAY, $sformatf("m%0d readback %h: %h != %h", m, a, r, d));
          end
        end
      join_none
    end
    wait fork;
    begin
      int total = 0;
      for (int s = 0; s < 4; s++) begin
        total += rd_log[s].size();
        foreach (rd_log[s][i]) check(rd_log[s][i][31:30] == 2'(s), "read routed to wrong slave");
        foreach (wr_log[s][i]) check(wr_log[s][i][31:30] == 2'(s), "write routed to wrong slave");
      end
      check(total == 160, $sformatf("total reads %0d", total));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
