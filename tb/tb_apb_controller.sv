// tb_apb_controller: drives random APB requests into the controller and checks, against a
// model of the address map, the PSEL line raised, the signals broadcast to the peripherals,
// and the PRDATA/PREADY returned (the selected peripheral's, or 0 and ready when no
// peripheral decodes the address).
module tb_apb_controller;
  import amba_pkg::*;
  apb_req_t   req;
  apb_resp_t  resp;
  logic [2:0] psel;
  logic       penable, pwrite;
  logic [7:0] paddr, pwdata;
  logic [7:0] prdata[3];
  logic [2:0] pready;
  int checks = 0, failures = 0;

  apb_controller dut (.apb_req(req), .apb_resp(resp), .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int idx;
      logic [2:0] exp_sel;
      logic exp_rdy;
      logic [31:0] exp_rd;
      req = apb_req_t'({$urandom, $urandom, $urandom, $urandom});
      req.psel = (n % 5 != 0);
      for (int i = 0; i < 3; i++) prdata[i] = 8'($urandom);
      pready = 3'($urandom);
      #1;
      idx = req.paddr[3:2];
      exp_sel = (req.psel && idx != 0) ? 3'(1 << (idx - 1)) : 3'b000;
      exp_rdy = exp_sel != 0 ? pready[idx - 1] : 1'b1;
      exp_rd  = exp_sel != 0 ? {24'h0, prdata[idx - 1]} : 32'h0;
      checks++;
      if (psel !== exp_sel || penable !== req.penable || pwrite !== req.pwrite ||
          paddr !== req.paddr[7:0] || pwdata !== req.pwdata[7:0]) begin
        failures++; $display("FAIL forward addr=%h psel=%b exp=%b", req.paddr, psel, exp_sel);
      end
      checks++;
      if (resp.pready !== exp_rdy || resp.prdata !== exp_rd) begin
        failures++; $display("FAIL return addr=%h rdy=%b rd=%h", req.paddr, resp.pready, resp.prdata);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
