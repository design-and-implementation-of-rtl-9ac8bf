// apb_mem_slave: behavioural APB4 memory slave for testbenches.
//
// Word memory addressed by PADDR; an unwritten word reads as ~PADDR. A write happens in the
// ENABLE cycle where PREADY is high, byte lanes by PSTRB. With wait_en low PREADY is always
// high (no wait states); with wait_en high PREADY is high on random cycles, giving random
// wait states.
module apb_mem_slave
  import amba_pkg::*;
(
  input  logic      clk,
  input  logic      wait_en,
  input  apb_req_t  req,
  output apb_resp_t resp
);

  logic [31:0] mem [logic [31:0]];
  logic        rnd = 1'b0;

  always @(posedge clk) rnd <= 1'($urandom);

  always_comb begin
    resp.pready = !wait_en || rnd;
    resp.prdata = mem.exists(req.paddr) ? mem[req.paddr] : ~req.paddr;
  end

  always @(posedge clk) begin
    if (req.psel && req.penable && resp.pready && req.pwrite) begin
      logic [31:0] w;
      w = mem.exists(req.paddr) ? mem[req.paddr] : ~req.paddr;
      for (int b = 0; b < 4; b++) if (req.pstrb[b]) w[8*b +: 8] = req.pwdata[8*b +: 8];
      mem[req.paddr] = w;
    end
  end

endmodule
