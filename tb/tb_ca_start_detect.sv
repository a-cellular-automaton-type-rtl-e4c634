// Test of the starting-pixel detector on a 9 x 11 plane. Random unfired
// planes of varying density (including none at all) are applied; the row
// lines are formed from the plane here, and the expected choice, the first
// unfired pixel in row-major order, is found by a plain scan.
module tb_ca_start_detect;
  localparam int unsigned ROWS = 9;
  localparam int unsigned COLS = 11;
  logic [ROWS-1:0][COLS-1:0] unfired_map;
  logic [ROWS-1:0] row_unfired;
  logic found;
  logic [ROWS-1:0] row_oh;
  logic [COLS-1:0] col_oh;
  logic [3:0] row_idx, col_idx;
  int checks = 0, failures = 0;

  ca_start_detect #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  always_comb for (int r = 0; r < ROWS; r++) row_unfired[r] = |unfired_map[r];

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int er, ec, pct;
      er = -1; ec = -1; pct = (i % 10) * 3;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++)
          unfired_map[r][c] = ($urandom_range(99) < pct);
      #1;
      for (int r = 0; r < ROWS && er < 0; r++)
        for (int c = 0; c < COLS; c++)
          if (unfired_map[r][c]) begin er = r; ec = c; break; end
      checks++;
      if (er < 0) begin
        if (found) begin failures++; $display("FAIL: found on empty plane"); end
      end else if (!found || int'(row_idx) != er || int'(col_idx) != ec ||
                   row_oh != (ROWS'(1) << er) || col_oh != (COLS'(1) << ec)) begin
        failures++;
        if (failures < 10)
          $display("FAIL: got %0d,%0d (found %b), expected %0d,%0d", row_idx, col_idx, found, er, ec);
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
