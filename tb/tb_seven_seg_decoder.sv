// tb_seven_seg_decoder: writes every value 0x00..0xFF over the APB write sequence (SETUP,
// then ENABLE) and compares seg with the hexadecimal digit shapes, listed here as which of
// the segments a..g are lit; also reads each value back and checks that a SETUP cycle alone
// or an unselected write changes nothing.
module tb_seven_seg_decoder;
  logic clk = 0, rst_n = 0;
  logic psel = 0, penable = 0, pwrite = 0;
  logic [7:0] pwdata = 0, prdata;
  logic pready;
  logic [6:0] seg;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  seven_seg_decoder dut (.clk, .rst_n, .psel, .penable, .pwrite, .pwdata, .prdata, .pready, .seg);

  // Lit segments per digit, as letters.
  string shape[16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                       "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  function automatic logic [6:0] expect_seg(input int d);
    logic [6:0] s = '0;
    foreach (shape[d][i]) s[6 - (shape[d][i] - "a")] = 1'b1;
    return s;
  endfunction

  task automatic apb_write(input logic [7:0] v, input logic sel);
    @(negedge clk); psel = sel; pwrite = 1; pwdata = v; penable = 0;
    @(negedge clk); penable = 1;
    @(negedge clk); psel = 0; penable = 0; pwrite = 0;
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++;
    if (seg !== expect_seg(0)) begin failures++; $display("FAIL reset seg=%b", seg); end
    for (int v = 0; v < 256; v++) begin
      apb_write(8'(v), 1'b1);
      checks++;
      if (seg !== expect_seg(v % 16)) begin
        failures++; $display("FAIL value %h seg=%b exp=%b", v, seg, expect_seg(v % 16));
      end
      checks++;
      if (prdata !== 8'(v) || pready !== 1'b1) begin failures++; $display("FAIL readback %h", prdata); end
    end
    // Unselected write and SETUP-only cycle: no change.
    apb_write(8'h05, 1'b0);
    @(negedge clk); psel = 1; pwrite = 1; pwdata = 8'h07;
    @(negedge clk); psel = 0; pwrite = 0;
    checks++;
    if (prdata !== 8'hFF || seg !== expect_seg(15)) begin failures++; $display("FAIL spurious write %h", prdata); end
    checks++;
    if (expect_seg(0) !== 7'b1111110) begin failures++; $display("FAIL table"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
