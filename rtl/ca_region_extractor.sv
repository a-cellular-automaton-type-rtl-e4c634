// Cellular-automaton region extractor: top level.
//
// Input is a binary boundary image, as produced by a coarse segmentation
// stage: a 1 marks a pixel that lies on a region boundary. The circuit finds
// the regions of 4-connected non-boundary pixels and delivers them one after
// the other. For each region it picks an unfired starting pixel, lets a
// "firing" state spread from pixel to neighbouring pixel in all pixels at once
// until the spread stops, reads the firing pixels out row by row and marks
// them fired, so that the next region starts from what is left. Because the
// spreading is pixel-parallel and the tests use one line per row, the time per
// region grows with the image's side length, not with its pixel count.
//
// Interface: pulse `start` for one clock with `boundary` valid; `boundary`
// is read in the clock after (the INIT clock) and may change afterwards.
// Each region comes out as a burst of `out_valid` rows (`out_row`, `out_bits`,
// with `out_last` on the final row) tagged with `region_id` (1 for the first
// region). `ro_mode` picks the whole region or only its boundary and is
// sampled when a region's readout begins. `seed_row`/`seed_col` give the
// starting pixel the detector would pick now (it is taken in the DETECT phase),
// and `phase` the controller's current step. `done` rises when no unfired pixel
// is left; `cycles` then holds the total processing time in clocks and
// `region_id` the number of regions.
//
// Blocks: `ca_pixel_array` (the pixel plane and its row lines),
// `ca_start_detect` (starting pixel), `ca_readout` (row-serial readout) and
// `ca_controller` (the step sequence). The default size is the 30 x 30 image
// of the FPGA experiment in the document.
module ca_region_extractor
  import ca_pkg::*;
#(
  parameter int unsigned ROWS  = DEF_ROWS,
  parameter int unsigned COLS  = DEF_COLS,
  parameter int unsigned CYC_W = 24,
  localparam int unsigned RW   = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned CW   = (COLS > 1) ? $clog2(COLS) : 1,
  localparam int unsigned ID_W = $clog2(ROWS * COLS + 1)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  ro_mode_t                  ro_mode,
  input  logic [ROWS-1:0][COLS-1:0] boundary,
  output phase_t                    phase,
  output logic                      busy,
  output logic                      done,
  output logic [ID_W-1:0]           region_id,
  output logic [CYC_W-1:0]          cycles,
  output logic                      out_valid,
  output logic [RW-1:0]             out_row,
  output logic [COLS-1:0]           out_bits,
  output logic                      out_last,
  output logic [RW-1:0]             seed_row,
  output logic [CW-1:0]             seed_col
);

  logic                      load, set_start, expand, ro_start, clear;
  logic                      found, any_changed;
  logic [ROWS-1:0][COLS-1:0] unfired_map, firing_map;
  logic [ROWS-1:0]           row_unfired, row_firing, row_changed;
  logic [ROWS-1:0]           start_row_oh;
  logic [COLS-1:0]           start_col_oh;

  ca_pixel_array #(.ROWS(ROWS), .COLS(COLS)) u_array (
    .clk          (clk),
    .rst_n        (rst_n),
    .load         (load),
    .boundary     (boundary),
    .clear        (clear),
    .set_start    (set_start),
    .start_row_oh (start_row_oh),
    .start_col_oh (start_col_oh),
    .expand       (expand),
    .unfired_map  (unfired_map),
    .firing_map   (firing_map),
    .row_unfired  (row_unfired),
    .row_firing   (row_firing),
    .row_changed  (row_changed)
  );

  ca_start_detect #(.ROWS(ROWS), .COLS(COLS)) u_start (
    .unfired_map (unfired_map),
    .row_unfired (row_unfired),
    .found       (found),
    .row_oh      (start_row_oh),
    .col_oh      (start_col_oh),
    .row_idx     (seed_row),
    .col_idx     (seed_col)
  );

  assign any_changed = |row_changed;

  ca_readout #(.ROWS(ROWS), .COLS(COLS)) u_readout (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (ro_start),
    .mode       (ro_mode),
    .row_firing (row_firing),
    .firing_map (firing_map),
    .out_valid  (out_valid),
    .out_row    (out_row),
    .out_bits   (out_bits),
    .out_last   (out_last)
  );

  ca_controller #(.ID_W(ID_W), .CYC_W(CYC_W)) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (start),
    .found       (found),
    .any_changed (any_changed),
    .ro_last     (out_last),
    .phase       (phase),
    .load        (load),
    .set_start   (set_start),
    .expand      (expand),
    .ro_start    (ro_start),
    .clear       (clear),
    .busy        (busy),
    .done        (done),
    .region_id   (region_id),
    .cycles      (cycles)
  );

endmodule
