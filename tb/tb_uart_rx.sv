// tb_uart_rx: drives 8N1 frames of random bytes into rxd (32 cycles per bit, tick16 every 2
// cycles) and checks the received byte and a single valid pulse per frame; a frame with a low
// stop bit and a short low glitch must produce no valid.
module tb_uart_rx;
  logic clk = 0, rst_n = 0;
  logic tick16 = 0, rxd = 1;
  logic [7:0] data;
  logic valid;
  int checks = 0, failures = 0;
  int n_valid = 0;
  logic [7:0] last_data;

  always #5 clk = ~clk;
  always @(posedge clk) tick16 <= ~tick16;

  uart_rx dut (.clk, .rst_n, .tick16, .rxd, .data, .valid);

  always @(posedge clk) if (valid) begin n_valid++; last_data = data; end

  localparam int BIT = 32;

  task automatic send(input logic [7:0] b, input logic stop);
    logic [9:0] frame = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rxd = frame[i];
      repeat (BIT) @(negedge clk);
    end
    rxd = 1;
    repeat (BIT) @(negedge clk);
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (40) @(negedge clk);
    for (int n = 0; n < 20; n++) begin
      logic [7:0] b;
      int n_before;
      b = 8'($urandom);
      n_before = n_valid;
      send(b, 1'b1);
      checks++;
      if (n_valid != n_before + 1 || last_data !== b) begin
        failures++; $display("FAIL byte %h got %h pulses %0d", b, last_data, n_valid - n_before);
      end
    end
    begin
      int n_before;
      n_before = n_valid;
      send(8'h3C, 1'b0);          // framing error
      repeat (2 * BIT) @(negedge clk);
      rxd = 0; repeat (4) @(negedge clk); rxd = 1;  // glitch shorter than half a bit
      repeat (12 * BIT) @(negedge clk);
      checks++;
      if (n_valid != n_before) begin failures++; $display("FAIL bad frame accepted"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
