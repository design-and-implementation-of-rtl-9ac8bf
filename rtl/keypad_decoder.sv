// keypad_decoder: 3x3 matrix keypad scanner, read over APB on PSEL1.
//
// The column lines Cn1..Cn3 are driven one at a time (one-hot, active high); the row lines
// Rw1..Rw3 are read through a two-flop synchroniser. A pressed key joins its column to its
// row. On each scan tick the decoder looks at the rows for the column it is driving, and if a
// row is high it records the key value (row-1)*3 + column, 1..9 (the lowest row wins if
// several are high), then moves on to the next column. A key is thus seen within three
// ticks of being pressed, and again on every scan while it is held.
//
// APB (8-bit read-only register, any offset): PRDATA[7] = a key was seen since the last read,
// PRDATA[3:0] = the last key value (0 before any key). A read clears bit 7. PREADY is always
// high, so an access takes the bridge's two APB cycles. Writes are ignored. The keypad size
// and line names follow the original description; the scan scheme, value formula and register
// layout are this design's choices.
module keypad_decoder (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       scan_tick,
  output logic [2:0] col,
  input  logic [2:0] row,
  input  logic       psel,
  input  logic       penable,
  input  logic       pwrite,
  output logic [7:0] prdata,
  output logic       pready
);

  logic [2:0] row_s1, row_s2;
  logic [1:0] col_idx;
  logic [3:0] key_code;
  logic       key_new;
  logic       rd_access;

  assign rd_access = psel && penable && !pwrite;

  // Key value for the driven column and the lowest high row.
  function automatic logic [3:0] key_value(input logic [2:0] rows, input logic [1:0] c);
    logic [3:0] v;
    v = '0;
    for (int r = 2; r >= 0; r--)
      if (rows[r]) v = 4'(r * 3) + 4'(c) + 4'd1;
    return v;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_s1   <= '0;
      row_s2   <= '0;
      col_idx  <= '0;
      key_code <= '0;
      key_new  <= 1'b0;
    end else begin
      row_s1 <= row;
      row_s2 <= row_s1;
      if (rd_access) key_new <= 1'b0;
      if (scan_tick) begin
        if (row_s2 != '0) begin
          key_code <= key_value(row_s2, col_idx);
          key_new  <= 1'b1;
        end
        col_idx <= (col_idx == 2'd2) ? 2'd0 : col_idx + 2'd1;
      end
    end
  end

  always_comb begin
    col = '0;
    col[col_idx] = 1'b1;
  end

  assign prdata = {key_new, 3'b000, key_code};
  assign pready = 1'b1;

endmodule
