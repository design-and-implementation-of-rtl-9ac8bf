// axi_apb_bridge: AXI4-Lite slave that performs each AXI access as one APB4 transfer.
//
// AXI side: the read address (AR), write address (AW) and write data (W) channels each land
// in a one-entry holding register. A channel's READY is the flip-flop "holding register is
// empty", so READY is a register and may be high before VALID arrives; a transfer happens
// in a cycle where both are high. R and B are driven from registers until the master takes
// them. Responses are always OKAY (the APB side has no error signal).
//
// APB side: the IDLE / SETUP / ENABLE state machine. From IDLE a held read, or a held write
// whose address and data have both arrived, loads PADDR/PWRITE/PWDATA/PSTRB/PPROT and raises
// PSEL (SETUP, one cycle). ENABLE raises PENABLE and lasts until PREADY is high; the transfer
// completes there. If another transfer is waiting, ENABLE goes straight back to SETUP with
// PSEL kept high, otherwise to IDLE. When a read and a write are both waiting the read goes
// first. A new transfer of a kind starts only once the previous response of that kind has
// been taken, so a read costs 1 (capture) + 2 (SETUP, ENABLE) cycles before RVALID with a
// zero-wait APB slave. The state machine and read-before-write order follow the original description;
// the holding registers and response timing are this design's own.
module axi_apb_bridge
  import amba_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  axi_req_t  axi_req,
  output axi_resp_t axi_resp,
  output apb_req_t  apb_req,
  input  apb_resp_t apb_resp
);

  apb_state_e state;

  logic              ar_pend, aw_pend, w_pend;
  logic [ADDR_W-1:0] ar_addr_q, aw_addr_q;
  logic [2:0]        ar_prot_q, aw_prot_q;
  logic [DATA_W-1:0] w_data_q;
  logic [STRB_W-1:0] w_strb_q;
  logic              r_valid_q, b_valid_q;
  logic [DATA_W-1:0] r_data_q;
  logic              cur_read;   // transfer on the APB bus is a read

  // Which transfer may start now. In ENABLE the current transfer's response is about to be
  // registered, so the same kind may not start again yet.
  logic rd_ok, wr_ok, ending;
  assign ending = (state == APB_ENABLE) && apb_resp.pready;
  always_comb begin
    rd_ok = ar_pend && !r_valid_q && !(ending && cur_read);
    wr_ok = aw_pend && w_pend && !b_valid_q && !(ending && !cur_read);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= APB_IDLE;
      ar_pend   <= 1'b0; aw_pend <= 1'b0; w_pend <= 1'b0;
      ar_addr_q <= '0;   ar_prot_q <= '0;
      aw_addr_q <= '0;   aw_prot_q <= '0;
      w_data_q  <= '0;   w_strb_q  <= '0;
      r_valid_q <= 1'b0; b_valid_q <= 1'b0; r_data_q <= '0;
      cur_read  <= 1'b0;
      apb_req   <= '0;
    end else begin
      // AXI captures: READY is simply "not pending".
      if (axi_req.ar_valid && !ar_pend) begin
        ar_pend <= 1'b1; ar_addr_q <= axi_req.ar_addr; ar_prot_q <= axi_req.ar_prot;
      end
      if (axi_req.aw_valid && !aw_pend) begin
        aw_pend <= 1'b1; aw_addr_q <= axi_req.aw_addr; aw_prot_q <= axi_req.aw_prot;
      end
      if (axi_req.w_valid && !w_pend) begin
        w_pend <= 1'b1; w_data_q <= axi_req.w_data; w_strb_q <= axi_req.w_strb;
      end
      // AXI responses taken by the master.
      if (r_valid_q && axi_req.r_ready) r_valid_q <= 1'b0;
      if (b_valid_q && axi_req.b_ready) b_valid_q <= 1'b0;

      unique case (state)
        APB_SETUP: begin
          apb_req.penable <= 1'b1;
          state           <= APB_ENABLE;
        end
        APB_ENABLE: begin
          if (apb_resp.pready) begin
            if (cur_read) begin
              r_valid_q <= 1'b1;
              r_data_q  <= apb_resp.prdata;
            end else begin
              b_valid_q <= 1'b1;
            end
            apb_req.penable <= 1'b0;
            if (!(rd_ok || wr_ok)) begin
              apb_req.psel <= 1'b0;
              state        <= APB_IDLE;
            end
          end
        end
        default: ;  // APB_IDLE
      endcase

      // Start a transfer from IDLE, or back-to-back from a completing ENABLE.
      if (state == APB_IDLE || ending) begin
        if (rd_ok) begin
          ar_pend         <= 1'b0;
          cur_read        <= 1'b1;
          apb_req.paddr   <= ar_addr_q;
          apb_req.pprot   <= ar_prot_q;
          apb_req.pwrite  <= 1'b0;
          apb_req.pstrb   <= '0;
          apb_req.psel    <= 1'b1;
          apb_req.penable <= 1'b0;
          state           <= APB_SETUP;
        end else if (wr_ok) begin
          aw_pend         <= 1'b0;
          w_pend          <= 1'b0;
          cur_read        <= 1'b0;
          apb_req.paddr   <= aw_addr_q;
          apb_req.pprot   <= aw_prot_q;
          apb_req.pwrite  <= 1'b1;
          apb_req.pwdata  <= w_data_q;
          apb_req.pstrb   <= w_strb_q;
          apb_req.psel    <= 1'b1;
          apb_req.penable <= 1'b0;
          state           <= APB_SETUP;
        end
      end
    end
  end

  always_comb begin
    axi_resp          = '0;
    axi_resp.ar_ready = !ar_pend;
    axi_resp.aw_ready = !aw_pend;
    axi_resp.w_ready  = !w_pend;
    axi_resp.r_valid  = r_valid_q;
    axi_resp.r_data   = r_data_q;
    axi_resp.r_resp   = RESP_OKAY;
    axi_resp.b_valid  = b_valid_q;
    axi_resp.b_resp   = RESP_OKAY;
  end

  // Handshake rules: a VALID, once raised, stays until READY; its payload stays stable.
  a_ar_hold: assert property (@(posedge clk) disable iff (!rst_n)
    axi_req.ar_valid && ar_pend |=> axi_req.ar_valid && $stable(axi_req.ar_addr));
  a_aw_hold: assert property (@(posedge clk) disable iff (!rst_n)
    axi_req.aw_valid && aw_pend |=> axi_req.aw_valid && $stable(axi_req.aw_addr));
  a_w_hold: assert property (@(posedge clk) disable iff (!rst_n)
    axi_req.w_valid && w_pend |=> axi_req.w_valid && $stable(axi_req.w_data));
  // APB: SETUP lasts one cycle, and address, direction and select stay stable into ENABLE.
  a_setup_one: assert property (@(posedge clk) disable iff (!rst_n)
    apb_req.psel && !apb_req.penable |=> apb_req.psel && apb_req.penable
                                         && $stable(apb_req.paddr) && $stable(apb_req.pwrite));
  a_enable_hold: assert property (@(posedge clk) disable iff (!rst_n)
    apb_req.penable && !apb_resp.pready |=> apb_req.penable && $stable(apb_req.paddr));

endmodule
