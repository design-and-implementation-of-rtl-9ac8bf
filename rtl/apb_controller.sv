// apb_controller: connects the bridge of AXI slave 0 to its three peripherals.
//
// The bridge runs the APB state machine and drives a 32-bit APB transfer; this controller
// narrows it to the 8-bit peripheral bus (PADDR[7:0], PWDATA[7:0]), asks the address decoder
// which of PSEL1..PSEL3 to raise, and broadcasts PENABLE and PWRITE to all peripherals. The
// selected peripheral's PRDATA (zero-extended to 32 bits) and PREADY go back to the bridge,
// which completes the access when PREADY is high. An address no peripheral decodes completes
// at once and reads 0. Purely combinational, so the peripherals see the bridge's
// SETUP/ENABLE cycles unchanged. The 8-bit peripheral bus follows the original
// description; the handling of unmapped addresses is this design's choice.
module apb_controller
  import amba_pkg::*;
(
  input  apb_req_t           apb_req,
  output apb_resp_t          apb_resp,
  output logic [2:0]         psel,     // [0] = PSEL1 keypad, [1] = PSEL2 seven-segment, [2] = PSEL3 UART
  output logic               penable,
  output logic               pwrite,
  output logic [PADDR_W-1:0] paddr,
  output logic [PDATA_W-1:0] pwdata,
  input  logic [PDATA_W-1:0] prdata[3],
  input  logic [2:0]         pready
);

  apb_addr_decoder u_dec (.psel(apb_req.psel), .paddr(apb_req.paddr[PADDR_W-1:0]), .sel(psel));

  assign penable = apb_req.penable;
  assign pwrite  = apb_req.pwrite;
  assign paddr   = apb_req.paddr[PADDR_W-1:0];
  assign pwdata  = apb_req.pwdata[PDATA_W-1:0];

  always_comb begin
    apb_resp = '{pready: 1'b1, prdata: '0};
    for (int i = 0; i < 3; i++) begin
      if (psel[i]) begin
        apb_resp.pready = pready[i];
        apb_resp.prdata = DATA_W'(prdata[i]);
      end
    end
  end

endmodule
