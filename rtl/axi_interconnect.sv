// axi_interconnect: 4-master, 4-slave AXI4-Lite crossbar built from decoders and multiplexers.
//
// Every master's read and write address goes through a 2:4 decoder (axi_addr_decoder) that
// names the target slave. Each slave has two 4:1 multiplexers, one for the read path (AR, R)
// and one for the write path (AW, W, B). A free multiplexer grants the lowest-numbered master
// that requests its slave (master 0 has the highest priority, master 3 the lowest) and holds
// that grant until the response handshake (R or B) completes; it then re-arbitrates. While
// granted, the master's address (and write data) channel is forwarded until the slave accepts
// it, and the slave's response is routed back to that master only.
//
// Timing: the grant is a register, so a request reaches the slave one cycle after the master
// presents it; payloads and handshakes are then combinational through the multiplexers.
// Separate read and write multiplexers per slave are this design's choice: they let a read
// and a write meet at a slave's bridge, which orders them (read first).
// Masters must keep at most one read and one write outstanding, since W carries no address.
module axi_interconnect
  import amba_pkg::*;
#(
  parameter int unsigned NM = N_MASTER,
  parameter int unsigned NS = N_SLAVE
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axi_req_t  m_req [NM],
  output axi_resp_t m_resp[NM],
  output axi_req_t  s_req [NS],
  input  axi_resp_t s_resp[NS]
);

  localparam int unsigned MW = (NM > 1) ? $clog2(NM) : 1;

  logic [NS-1:0] ar_sel[NM];
  logic [NS-1:0] aw_sel[NM];

  for (genvar m = 0; m < NM; m++) begin : g_dec
    logic [N_SLAVE-1:0] ar_dec, aw_dec;
    axi_addr_decoder u_ar_dec (.valid(m_req[m].ar_valid), .addr(m_req[m].ar_addr), .sel(ar_dec));
    axi_addr_decoder u_aw_dec (.valid(m_req[m].aw_valid), .addr(m_req[m].aw_addr), .sel(aw_dec));
    assign ar_sel[m] = ar_dec[NS-1:0];
    assign aw_sel[m] = aw_dec[NS-1:0];
  end

  // Per-slave grant state.
  logic          rd_busy[NS], wr_busy[NS];
  logic [MW-1:0] rd_own [NS], wr_own [NS];
  logic          ar_done[NS], aw_done[NS], w_done[NS];

  for (genvar s = 0; s < NS; s++) begin : g_slv
    logic          rd_req_any, wr_req_any;
    logic [MW-1:0] rd_win, wr_win;

    // Fixed-priority pick: the lowest master index wins.
    always_comb begin
      rd_req_any = 1'b0; rd_win = '0;
      wr_req_any = 1'b0; wr_win = '0;
      for (int m = NM - 1; m >= 0; m--) begin
        if (ar_sel[m][s]) begin rd_req_any = 1'b1; rd_win = MW'(m); end
        if (aw_sel[m][s]) begin wr_req_any = 1'b1; wr_win = MW'(m); end
      end
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        rd_busy[s] <= 1'b0; rd_own[s] <= '0; ar_done[s] <= 1'b0;
        wr_busy[s] <= 1'b0; wr_own[s] <= '0; aw_done[s] <= 1'b0; w_done[s] <= 1'b0;
      end else begin
        // Read multiplexer
        if (!rd_busy[s]) begin
          if (rd_req_any) begin
            rd_busy[s] <= 1'b1; rd_own[s] <= rd_win; ar_done[s] <= 1'b0;
          end
        end else begin
          if (s_req[s].ar_valid && s_resp[s].ar_ready) ar_done[s] <= 1'b1;
          if (s_resp[s].r_valid && s_req[s].r_ready) rd_busy[s] <= 1'b0;
        end
        // Write multiplexer
        if (!wr_busy[s]) begin
          if (wr_req_any) begin
            wr_busy[s] <= 1'b1; wr_own[s] <= wr_win; aw_done[s] <= 1'b0; w_done[s] <= 1'b0;
          end
        end else begin
          if (s_req[s].aw_valid && s_resp[s].aw_ready) aw_done[s] <= 1'b1;
          if (s_req[s].w_valid && s_resp[s].w_ready) w_done[s] <= 1'b1;
          if (s_resp[s].b_valid && s_req[s].b_ready) wr_busy[s] <= 1'b0;
        end
      end
    end

    // Forward the granted masters' channels to the slave.
    always_comb begin
      s_req[s]          = '0;
      s_req[s].ar_addr  = m_req[rd_own[s]].ar_addr;
      s_req[s].ar_prot  = m_req[rd_own[s]].ar_prot;
      s_req[s].ar_valid = rd_busy[s] && !ar_done[s] && m_req[rd_own[s]].ar_valid;
      s_req[s].r_ready  = rd_busy[s] && ar_done[s] && m_req[rd_own[s]].r_ready;
      s_req[s].aw_addr  = m_req[wr_own[s]].aw_addr;
      s_req[s].aw_prot  = m_req[wr_own[s]].aw_prot;
      s_req[s].aw_valid = wr_busy[s] && !aw_done[s] && m_req[wr_own[s]].aw_valid;
      s_req[s].w_data   = m_req[wr_own[s]].w_data;
      s_req[s].w_strb   = m_req[wr_own[s]].w_strb;
      s_req[s].w_valid  = wr_busy[s] && !w_done[s] && m_req[wr_own[s]].w_valid;
      s_req[s].b_ready  = wr_busy[s] && m_req[wr_own[s]].b_ready;
    end
  end

  // Route the slaves' ready and response signals back to the owning master.
  always_comb begin
    for (int m = 0; m < NM; m++) begin
      m_resp[m] = '0;
      for (int s = NS - 1; s >= 0; s--) begin
        if (rd_busy[s] && rd_own[s] == MW'(m)) begin
          if (!ar_done[s]) m_resp[m].ar_ready = s_resp[s].ar_ready;
          if (ar_done[s] && s_resp[s].r_valid) begin
            m_resp[m].r_valid = 1'b1;
            m_resp[m].r_data  = s_resp[s].r_data;
            m_resp[m].r_resp  = s_resp[s].r_resp;
          end
        end
        if (wr_busy[s] && wr_own[s] == MW'(m)) begin
          if (!aw_done[s]) m_resp[m].aw_ready = s_resp[s].aw_ready;
          if (!w_done[s])  m_resp[m].w_ready  = s_resp[s].w_ready;
          if (s_resp[s].b_valid) begin
            m_resp[m].b_valid = 1'b1;
            m_resp[m].b_resp  = s_resp[s].b_resp;
          end
        end
      end
    end
  end

endmodule
