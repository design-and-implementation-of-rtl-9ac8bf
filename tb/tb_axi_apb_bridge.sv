// tb_axi_apb_bridge: one bridge between a bus-functional AXI master and an APB memory model.
//  - Every APB transfer must be SETUP for one cycle, then ENABLE until PREADY, with PADDR,
//    PWRITE and PSEL stable (checked on every cycle) and PSTRB = 0 on reads.
//  - Read latency with a zero-wait APB slave: RVALID rises 3 cycles after the AR handshake
//    (one cycle into the holding register, SETUP, ENABLE).
//  - A read and a write issued in the same cycle: the APB side must carry the read first,
//    and the write must follow straight from ENABLE to SETUP with PSEL held high.
//  - 200 random reads and writes with random APB wait states, checked against a memory
//    model kept in the testbench.
module tb_axi_apb_bridge;
  import amba_pkg::*;
  logic clk = 0, rst_n = 0;
  axi_req_t  m_req [1];
  axi_resp_t m_resp[1];
  apb_req_t  apb_req;
  apb_resp_t apb_resp;
  logic      wait_en = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  axi_apb_bridge dut (.clk, .rst_n, .axi_req(m_req[0]), .axi_resp(m_resp[0]), .apb_req, .apb_resp);
  apb_mem_slave u_apb (.clk, .wait_en, .req(apb_req), .resp(apb_resp));

  `include "axi_master_tasks.svh"

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // Monitor.
  int cyc = 0, t_ar = 0, last_lat = -1, n_b2b = 0, n_wait = 0;
  logic first_was_read;
  apb_req_t prev;
  bit log_on = 0, log_first = 0;
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (m_req[0].ar_valid && m_resp[0].ar_ready) t_ar = cyc;
    if (m_resp[0].r_valid && m_req[0].r_ready) last_lat = cyc - t_ar;
    if (prev.psel && !prev.penable)
      check(apb_req.psel && apb_req.penable && apb_req.paddr == prev.paddr && apb_req.pwrite == prev.pwrite,
            "SETUP not followed by ENABLE with stable address");
    if (prev.penable && !apb_resp.pready) n_wait++;
    if (apb_req.psel && !apb_req.penable && !apb_req.pwrite)
      check(apb_req.pstrb == 4'b0000, "PSTRB not 0 on a read");
    if (apb_req.psel && apb_req.penable && apb_resp.pready) begin
      if (log_on && !log_first) begin first_was_read = !apb_req.pwrite; log_first = 1; end
    end
    if (prev.psel && prev.penable && apb_req.psel && !apb_req.penable) n_b2b++;
    prev <= apb_req;
  end
  // Latency as seen in this monitor: the handshake edge is cycle t_ar, RVALID is first seen
  // on edge t_ar+4 (one edge after it rises 3 cycles later) when RREADY is already high.

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] model [logic [31:0]];

  initial begin
    logic [31:0] d;
    axi_resp_e e;
    m_req[0] = '0;
    prev = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (2) @(posedge clk);

    axi_write(0, 32'h0000_0040, 32'hCAFE_F00D, e);
    check(e == RESP_OKAY, "write resp");
    axi_read(0, 32'h0000_0040, d, e);
    check(d == 32'hCAFE_F00D && e == RESP_OKAY, $sformatf("read back %h", d));
    check(last_lat == 4, $sformatf("read latency %0d edges", last_lat));
    axi_read(0, 32'h0000_0080, d, e);
    check(d == ~32'h0000_0080, "read unwritten");

    // Read and write together: read first, then back-to-back.
    log_on = 1;
    begin
      int b2b0 = n_b2b;
      fork
        axi_read(0, 32'h0000_0040, d, e);
        begin
          axi_resp_e e2;
          axi_write(0, 32'h0000_0044, 32'h1234_5678, e2);
        end
      join
      check(log_first && first_was_read, "read did not go first");
      check(n_b2b == b2b0 + 1, "no ENABLE-to-SETUP transfer");
      check(d == 32'hCAFE_F00D, "read during write");
    end
    model[32'h40] = 32'hCAFE_F00D;
    model[32'h44] = 32'h1234_5678;

    // Random traffic with wait states.
    wait_en = 1;
    for (int k = 0; k < 200; k++) begin
      logic [31:0] a;
      a = 32'(($urandom % 16) * 4 + 32'h100);
      if ($urandom % 2) begin
        logic [31:0] w;
        w = $urandom;
        axi_write(0, a, w, e);
        model[a] = w;
        check(e == RESP_OKAY, "write resp");
      end else begin
        axi_read(0, a, d, e);
        check(d == (model.exists(a) ? model[a] : ~a), $sformatf("random read %h: %h", a, d));
      end
    end
    check(n_wait > 50, $sformatf("too few wait states %0d", n_wait));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
