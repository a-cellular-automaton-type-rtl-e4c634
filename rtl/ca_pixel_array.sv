// The M x N pixel plane of the region extractor.
//
// Every pixel is a `ca_pixel`; each one receives the firing outputs of its
// four nearest neighbours (pixels outside the image count as not firing), so
// the firing region grows by one pixel in each direction per clock while
// `expand` is high. Initialisation, expansion and clearing act on all pixels
// at once.
//
// Each row has three detection lines, the OR of one flag over the row: an
// unfired pixel exists, a firing pixel exists, and a pixel changed in the last
// clock. They let the start detector, the readout and the end-of-expansion
// test work one row at a time instead of one pixel at a time. The planes
// `unfired_map` and `firing_map` are also brought out for the start detector
// and the readout. The starting pixel is addressed by one-hot row and column
// selects, qualified by `set_start`.
//
// Timing: commands act on the next rising edge; the maps and all row lines
// show the new state right after it. The change lines compare the state with
// that of one clock earlier, so they report what the last edge changed. The
// neighbour wiring and the row lines follow the document; the one-hot start
// address is this design's choice.
module ca_pixel_array
  import ca_pkg::*;
#(
  parameter int unsigned ROWS = DEF_ROWS,
  parameter int unsigned COLS = DEF_COLS
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       load,
  input  logic [ROWS-1:0][COLS-1:0]  boundary,
  input  logic                       clear,
  input  logic                       set_start,
  input  logic [ROWS-1:0]            start_row_oh,
  input  logic [COLS-1:0]            start_col_oh,
  input  logic                       expand,
  output logic [ROWS-1:0][COLS-1:0]  unfired_map,
  output logic [ROWS-1:0][COLS-1:0]  firing_map,
  output logic [ROWS-1:0]            row_unfired,
  output logic [ROWS-1:0]            row_firing,
  output logic [ROWS-1:0]            row_changed
);

  logic [ROWS-1:0][COLS-1:0] changed_map;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      logic [3:0] nbr;
      assign nbr[NB_N] = (r > 0)        ? firing_map[(r > 0) ? r-1 : 0][c]           : 1'b0;
      assign nbr[NB_S] = (r < ROWS - 1) ? firing_map[(r < ROWS - 1) ? r+1 : r][c]    : 1'b0;
      assign nbr[NB_W] = (c > 0)        ? firing_map[r][(c > 0) ? c-1 : 0]           : 1'b0;
      assign nbr[NB_E] = (c < COLS - 1) ? firing_map[r][(c < COLS - 1) ? c+1 : c]    : 1'b0;

      ca_pixel u_pix (
        .clk         (clk),
        .rst_n       (rst_n),
        .load        (load),
        .boundary_in (boundary[r][c]),
        .clear       (clear),
        .set_start   (set_start & start_row_oh[r] & start_col_oh[c]),
        .expand      (expand),
        .nbr_firing  (nbr),
        .unfired     (unfired_map[r][c]),
        .firing      (firing_map[r][c]),
        .changed     (changed_map[r][c])
      );
    end

    // Row detection lines.
    assign row_unfired[r] = |unfired_map[r];
    assign row_firing[r]  = |firing_map[r];
    assign row_changed[r] = |changed_map[r];
  end

endmodule
