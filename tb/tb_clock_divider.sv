// tb_clock_divider: checks that tick is a single-cycle pulse exactly every DIV cycles, for a
// small divider (DIV = 5) and for the default divider (100000).
module tb_clock_divider;
  logic clk = 0, rst_n = 0;
  logic tick_s, tick_d;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  clock_divider #(.DIV(5)) dut_small (.clk, .rst_n, .tick(tick_s));
  clock_divider dut_def (.clk, .rst_n, .tick(tick_d));

  int cyc = 0, last_s = -1, last_d = -1, n_s = 0, n_d = 0;

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (tick_s) begin
      if (last_s >= 0) begin
        checks++;
        if (cyc - last_s != 5) begin failures++; $display("FAIL small period %0d", cyc - last_s); end
      end
      last_s <= cyc; n_s <= n_s + 1;
    end
    if (tick_d) begin
      if (last_d >= 0) begin
        checks++;
        if (cyc - last_d != 100000) begin failures++; $display("FAIL default period %0d", cyc - last_d); end
      end
      last_d <= cyc; n_d <= n_d + 1;
    end
  end

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (300005) @(posedge clk);
    checks++;
    if (n_d != 3) begin failures++; $display("FAIL default ticks %0d", n_d); end
    checks++;
    if (n_s < 60000 || n_s > 60001) begin failures++; $display("FAIL small ticks %0d", n_s); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
