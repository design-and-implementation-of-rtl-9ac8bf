// tb_keypad_decoder: presses each of the nine keys of a modelled 3x3 keypad (a pressed key
// joins its column line to its row line) and reads the key register over APB: the value must
// be (row-1)*3 + column with the "new" bit set, and a second read must find "new" cleared.
// Also checks the one-hot column scan, the reset value and that no key leaves the register
// alone. The scan tick comes from the testbench every 6 cycles.
module tb_keypad_decoder;
  logic clk = 0, rst_n = 0;
  logic scan_tick = 0;
  logic [2:0] col, row;
  logic psel = 0, penable = 0, pwrite = 0;
  logic [7:0] prdata;
  logic pready;
  int checks = 0, failures = 0;
  int press_r = -1, press_c = -1;  // pressed key (row, column), -1 = none

  always #5 clk = ~clk;

  keypad_decoder dut (.clk, .rst_n, .scan_tick, .col, .row, .psel, .penable, .pwrite, .prdata, .pready);

  // Keypad model.
  always_comb begin
    row = '0;
    if (press_r >= 0 && col[press_c]) row[press_r] = 1'b1;
  end

  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    scan_tick <= (cyc % 6 == 5);
  end

  // Columns are always one-hot.
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (!$onehot(col)) begin failures++; $display("FAIL col not one-hot %b", col); end
  end

  task automatic apb_read(output logic [7:0] d);
    @(negedge clk); psel = 1; pwrite = 0; penable = 0;
    @(negedge clk); penable = 1;
    #4 d = prdata;
    @(negedge clk); psel = 0; penable = 0;
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] d;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    apb_read(d);
    checks++;
    if (d !== 8'h00 || pready !== 1'b1) begin failures++; $display("FAIL reset read %h", d); end
    repeat (40) @(posedge clk);
    apb_read(d);
    checks++;
    if (d !== 8'h00) begin failures++; $display("FAIL idle read %h", d); end
    for (int r = 0; r < 3; r++) begin
      for (int c = 0; c < 3; c++) begin
        press_r = r; press_c = c;
        repeat (30) @(posedge clk);  // five scan ticks
        press_r = -1;
        repeat (30) @(posedge clk);
        apb_read(d);
        checks++;
        if (d !== {1'b1, 3'b000, 4'(r * 3 + c + 1)}) begin
          failures++; $display("FAIL key r%0d c%0d read %h", r + 1, c + 1, d);
        end
        apb_read(d);
        checks++;
        if (d !== {1'b0, 3'b000, 4'(r * 3 + c + 1)}) begin
          failures++; $display("FAIL key r%0d c%0d reread %h", r + 1, c + 1, d);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
