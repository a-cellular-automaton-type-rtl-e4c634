// Starting-pixel detector.
//
// Picks the unfired pixel from which the next region is grown. The row
// detection lines tell which rows still hold an unfired pixel; the first such
// row (lowest index) is chosen, and within it the first unfired column. The
// result is given both as one-hot selects, which address the pixel plane
// directly, and as binary row and column numbers. `found` is low when no
// unfired pixel is left, which ends the extraction.
//
// Purely combinational; the outputs follow the pixel state of the same clock.
// That some unfired pixel is chosen and that row lines are used follows the
// document; taking the lowest row and column is this design's choice.
module ca_start_detect
  import ca_pkg::*;
#(
  parameter int unsigned ROWS = DEF_ROWS,
  parameter int unsigned COLS = DEF_COLS,
  localparam int unsigned RW  = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned CW  = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic [ROWS-1:0][COLS-1:0] unfired_map,
  input  logic [ROWS-1:0]           row_unfired,
  output logic                      found,
  output logic [ROWS-1:0]           row_oh,
  output logic [COLS-1:0]           col_oh,
  output logic [RW-1:0]             row_idx,
  output logic [CW-1:0]             col_idx
);

  logic [COLS-1:0] sel_row_bits;

  // First row whose detection line is set.
  always_comb begin
    row_oh  = '0;
    row_idx = '0;
    for (int r = ROWS - 1; r >= 0; r--) begin
      if (row_unfired[r]) begin
        row_oh     = '0;
        row_oh[r]  = 1'b1;
        row_idx    = RW'(r);
      end
    end
  end

  // The unfired pixels of that row.
  always_comb begin
    sel_row_bits = '0;
    for (int r = 0; r < ROWS; r++) begin
      if (row_oh[r]) sel_row_bits |= unfired_map[r];
    end
  end

  // First unfired column of the chosen row.
  always_comb begin
    col_oh  = '0;
    col_idx = '0;
    for (int c = COLS - 1; c >= 0; c--) begin
      if (sel_row_bits[c]) begin
        col_oh     = '0;
        col_oh[c]  = 1'b1;
        col_idx    = CW'(c);
      end
    end
  end

  assign found = |row_unfired;

endmodule
