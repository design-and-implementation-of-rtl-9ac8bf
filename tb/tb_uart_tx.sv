// tb_uart_tx: sends random bytes and samples txd in the middle of every bit (tick16 every 2
// cycles, so a bit lasts 32 cycles): start bit low, data LSB first, stop bit high. Checks that
// busy lasts exactly 10 bit times, that txd idles high and that start is ignored while busy.
module tb_uart_tx;
  logic clk = 0, rst_n = 0;
  logic tick16 = 0, start = 0, busy, txd;
  logic [7:0] data = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always @(posedge clk) tick16 <= ~tick16;

  uart_tx dut (.clk, .rst_n, .tick16, .start, .data, .busy, .txd);

  localparam int BIT = 32;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (5) @(posedge clk);
    checks++;
    if (txd !== 1'b1 || busy !== 1'b0) begin failures++; $display("FAIL idle"); end
    for (int n = 0; n < 20; n++) begin
      logic [7:0] b;
      logic [9:0] frame;
      int t0, busy_len;
      b = 8'($urandom);
      frame = {1'b1, b, 1'b0};
      @(negedge clk); start = 1; data = b;
      @(negedge clk); start = 0; data = ~b;
      // Wait for the falling edge of the start bit, then sample mid-bit.
      while (txd !== 1'b0) @(negedge clk);
      repeat (BIT / 2) @(negedge clk);
      for (int i = 0; i < 10; i++) begin
        checks++;
        if (txd !== frame[i]) begin failures++; $display("FAIL byte %h bit %0d txd=%0b", b, i, txd); end
        if (i == 3) begin start = 1; data = 8'h00; @(negedge clk); start = 0; end
        else @(negedge clk);
        repeat (BIT - 1) @(negedge clk);
      end
      while (busy) @(negedge clk);
      checks++;
      if (txd !== 1'b1) begin failures++; $display("FAIL line not idle after frame"); end
    end
    // Busy length of one frame.
    begin
      int len = 0;
      @(negedge clk); start = 1; data = 8'hA5;
      @(negedge clk); start = 0;
      while (busy) begin len++; @(negedge clk); end
      checks++;
      if (len < 10 * BIT - 2 || len > 10 * BIT + 2) begin failures++; $display("FAIL busy length %0d", len); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
