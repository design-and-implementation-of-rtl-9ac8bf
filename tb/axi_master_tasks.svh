// AXI4-Lite master bus-functional tasks, included inside a testbench module that declares
// `clk` (period 10, posedges at 5 + 10k), `axi_req_t m_req[]` and `axi_resp_t m_resp[]`.
// Signals are driven just after a falling clock edge and handshakes are sampled 1 time unit
// before the rising edge, so the testbench never races the design.

task automatic axi_write(input int m, input logic [31:0] addr, input logic [31:0] data,
                         output axi_resp_e resp);
  bit aw_d, w_d, b_d;
  aw_d = 0; w_d = 0; b_d = 0;
  @(negedge clk);
  m_req[m].aw_valid = 1'b1; m_req[m].aw_addr = addr; m_req[m].aw_prot = 3'b000;
  m_req[m].w_valid  = 1'b1; m_req[m].w_data  = data; m_req[m].w_strb  = '1;
  m_req[m].b_ready  = 1'b1;
  while (!b_d) begin
    #4;
    if (m_req[m].aw_valid && m_resp[m].aw_ready) aw_d = 1;
    if (m_req[m].w_valid && m_resp[m].w_ready) w_d = 1;
    if (m_req[m].b_ready && m_resp[m].b_valid) begin b_d = 1; resp = m_resp[m].b_resp; end
    @(negedge clk);
    if (aw_d) m_req[m].aw_valid = 1'b0;
    if (w_d)  m_req[m].w_valid  = 1'b0;
  end
  m_req[m].b_ready = 1'b0;
endtask

task automatic axi_read(input int m, input logic [31:0] addr, output logic [31:0] data,
                        output axi_resp_e resp);
  bit ar_d, r_d;
  ar_d = 0; r_d = 0;
  @(negedge clk);
  m_req[m].ar_valid = 1'b1; m_req[m].ar_addr = addr; m_req[m].ar_prot = 3'b000;
  m_req[m].r_ready  = 1'b1;
  while (!r_d) begin
    #4;
    if (m_req[m].ar_valid && m_resp[m].ar_ready) ar_d = 1;
    if (m_req[m].r_ready && m_resp[m].r_valid) begin
      r_d = 1; data = m_resp[m].r_data; resp = m_resp[m].r_resp;
    end
    @(negedge clk);
    if (ar_d) m_req[m].ar_valid = 1'b0;
  end
  m_req[m].r_ready = 1'b0;
endtask
