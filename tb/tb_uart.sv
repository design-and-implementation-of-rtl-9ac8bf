// tb_uart: the UART peripheral with txd looped back to rxd (divisor 4, 64 cycles per bit).
// Writes bytes over APB and reads them back after they have gone round the loop; a second
// write issued while the first byte is still being sent must be held with PREADY low
// (APB wait states) for most of a frame and then complete. Also checks the status register
// (tx_busy, rx_valid) and that reading the data clears rx_valid.
module tb_uart;
  logic clk = 0, rst_n = 0;
  logic psel = 0, penable = 0, pwrite = 0;
  logic [1:0] paddr = 0;
  logic [7:0] pwdata = 0, prdata;
  logic pready, txd;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  uart #(.CLK_HZ(64000), .BAUD(1000)) dut (
    .clk, .rst_n, .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .txd, .rxd(txd)
  );

  localparam int BIT = 64;

  // APB access as the bridge makes it; returns the data and the number of wait states.
  task automatic apb(input logic wr, input logic [1:0] a, input logic [7:0] wd,
                     output logic [7:0] rd, output int waits);
    waits = 0;
    @(negedge clk); psel = 1; pwrite = wr; paddr = a; pwdata = wd; penable = 0;
    @(negedge clk); penable = 1;
    #4;
    while (!pready) begin waits++; @(negedge clk); #4; end
    rd = prdata;
    @(negedge clk); psel = 0; penable = 0; pwrite = 0;
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] d;
    int w;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    apb(0, 2'd1, 0, d, w);
    checks++;
    if (d !== 8'h00 || w != 0) begin failures++; $display("FAIL reset status %h", d); end
    for (int n = 0; n < 6; n++) begin
      logic [7:0] b;
      b = 8'($urandom);
      apb(1, 2'd0, b, d, w);
      checks++;
      if (w != 0) begin failures++; $display("FAIL idle write waited %0d", w); end
      apb(0, 2'd1, 0, d, w);
      checks++;
      if (d[0] !== 1'b1) begin failures++; $display("FAIL tx_busy not set %h", d); end
      repeat (11 * BIT) @(negedge clk);
      apb(0, 2'd1, 0, d, w);
      checks++;
      if (d !== 8'h02) begin failures++; $display("FAIL status after frame %h", d); end
      apb(0, 2'd0, 0, d, w);
      checks++;
      if (d !== b) begin failures++; $display("FAIL loopback sent %h got %h", b, d); end
      apb(0, 2'd1, 0, d, w);
      checks++;
      if (d !== 8'h00) begin failures++; $display("FAIL rx_valid not cleared %h", d); end
    end
    // Back-to-back writes: the second waits for the transmitter.
    apb(1, 2'd0, 8'h5A, d, w);
    apb(1, 2'd0, 8'hC3, d, w);
    checks++;
    if (w < 9 * BIT || w > 10 * BIT + 4) begin failures++; $display("FAIL wait states %0d", w); end
    repeat (11 * BIT) @(negedge clk);
    apb(0, 2'd0, 0, d, w);
    checks++;
    if (d !== 8'hC3) begin failures++; $display("FAIL second byte %h", d); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
