// tb_uart_baud_gen: checks the 16x-baud enable period, CLK_HZ / (16*BAUD) cycles, for a
// small configuration (divisor 7) and for the default one (100 MHz, 115200 baud: 54).
module tb_uart_baud_gen;
  logic clk = 0, rst_n = 0;
  logic t_small, t_def;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  uart_baud_gen #(.CLK_HZ(16 * 1000 * 7), .BAUD(1000)) dut_small (.clk, .rst_n, .tick16(t_small));
  uart_baud_gen dut_def (.clk, .rst_n, .tick16(t_def));

  int cyc = 0, last_s = -1, last_d = -1, n_d = 0;
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (t_small) begin
      if (last_s >= 0) begin
        checks++;
        if (cyc - last_s != 7) begin failures++; $display("FAIL small period %0d", cyc - last_s); end
      end
      last_s <= cyc;
    end
    if (t_def) begin
      if (last_d >= 0) begin
        checks++;
        if (cyc - last_d != 100000000 / (16 * 115200)) begin failures++; $display("FAIL default period %0d", cyc - last_d); end
      end
      last_d <= cyc; n_d <= n_d + 1;
    end
  end

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    repeat (5000) @(posedge clk);
    checks++;
    if (n_d < 90) begin failures++; $display("FAIL too few ticks %0d", n_d); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
