// axi_mem_slave: behavioural AXI4-Lite memory slave for testbenches.
//
// Holds one access of each direction at a time. READY on AR, AW and W is high on random
// cycles; a response follows after 0..3 random idle cycles. Unwritten words read as
// {ID, address[27:0]}.
module axi_mem_slave
  import amba_pkg::*;
#(
  parameter int unsigned ID = 0
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axi_req_t  req,
  output axi_resp_t resp
);

  logic [31:0] mem [logic [31:0]];

  logic        ar_hold, aw_hold, w_hold;
  logic [31:0] ar_a, aw_a, w_d;
  int          r_wait, b_wait;

  initial begin
    resp = '0;
    ar_hold = 0; aw_hold = 0; w_hold = 0;
  end

  function automatic logic [31:0] rd_word(input logic [31:0] a);
    if (mem.exists(a)) return mem[a];
    return {4'(ID), a[27:0]};
  endfunction

  always @(posedge clk) begin
    if (!rst_n) begin
      resp <= '0;
      ar_hold = 0; aw_hold = 0; w_hold = 0;
    end else begin
      // Handshakes of this edge.
      if (req.ar_valid && resp.ar_ready) begin
        ar_hold = 1; ar_a = req.ar_addr; r_wait = $urandom_range(0, 3);
      end
      if (req.aw_valid && resp.aw_ready) begin
        aw_hold = 1; aw_a = req.aw_addr; b_wait = $urandom_range(0, 3);
      end
      if (req.w_valid && resp.w_ready) begin w_hold = 1; w_d = req.w_data; end
      if (resp.r_valid && req.r_ready) begin resp.r_valid <= 1'b0; ar_hold = 0; end
      if (resp.b_valid && req.b_ready) begin resp.b_valid <= 1'b0; aw_hold = 0; w_hold = 0; end
      // Responses.
      if (ar_hold && !resp.r_valid) begin
        if (r_wait == 0) begin
          resp.r_valid <= 1'b1; resp.r_data <= rd_word(ar_a); resp.r_resp <= RESP_OKAY;
          r_wait = -1;
        end else if (r_wait > 0) r_wait--;
      end
      if (aw_hold && w_hold && !resp.b_valid) begin
        if (b_wait == 0) begin
          mem[aw_a] = w_d;
          resp.b_valid <= 1'b1; resp.b_resp <= RESP_OKAY;
          b_wait = -1;
        end else if (b_wait > 0) b_wait--;
      end
      resp.ar_ready <= !ar_hold && ($urandom_range(0, 2) != 0);
      resp.aw_ready <= !aw_hold && ($urandom_range(0, 2) != 0);
      resp.w_ready  <= !w_hold  && ($urandom_range(0, 2) != 0);
    end
  end

endmodule
