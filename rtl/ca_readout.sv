// Readout of the firing region, one image row per clock.
//
// When `start` is sampled high, the row detection lines of firing pixels are
// captured as the set of rows still to be sent, and the readout mode is
// latched. From the next clock on, every cycle presents the lowest pending row:
// its number on `out_row` and its column bits on `out_bits`, with
// `out_valid` high; the row then leaves the pending set. Rows with no firing
// pixel are skipped, so a region is read in as many clocks as it spans rows.
// `out_last` marks the final row of the region.
//
// In RO_REGION mode `out_bits` holds every firing pixel of the row; in
// RO_BOUNDARY mode only those of the firing region's boundary, meaning firing
// pixels with at least one 4-neighbour that is not firing or lies outside the
// image. The firing plane must stay unchanged while the readout runs.
//
// Outputs are combinational from the pending-row register. That the region or
// its boundary is read out, using the row lines, follows the document; the
// row-serial format, the row skipping and the boundary definition are this
// design's choices.
module ca_readout
  import ca_pkg::*;
#(
  parameter int unsigned ROWS = DEF_ROWS,
  parameter int unsigned COLS = DEF_COLS,
  localparam int unsigned RW  = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  ro_mode_t                  mode,
  input  logic [ROWS-1:0]           row_firing,
  input  logic [ROWS-1:0][COLS-1:0] firing_map,
  output logic                      out_valid,
  output logic [RW-1:0]             out_row,
  output logic [COLS-1:0]           out_bits,
  output logic                      out_last
);

  logic [ROWS-1:0]           pending;
  logic [ROWS-1:0]           first_oh;
  ro_mode_t                  mode_q;
  logic [ROWS-1:0][COLS-1:0] edge_map;

  // Boundary pixels of the firing region.
  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < COLS; c++) begin
        logic n, s, w, e;
        n = (r > 0)        ? firing_map[(r > 0) ? r-1 : 0][c]        : 1'b0;
        s = (r < ROWS - 1) ? firing_map[(r < ROWS - 1) ? r+1 : r][c] : 1'b0;
        w = (c > 0)        ? firing_map[r][(c > 0) ? c-1 : 0]        : 1'b0;
        e = (c < COLS - 1) ? firing_map[r][(c < COLS - 1) ? c+1 : c] : 1'b0;
        edge_map[r][c] = firing_map[r][c] & ~(n & s & w & e);
      end
    end
  end

  // Lowest pending row, and its bits.
  assign first_oh = pending & (~pending + ROWS'(1));

  always_comb begin
    out_row  = '0;
    out_bits = '0;
    for (int r = 0; r < ROWS; r++) begin
      if (first_oh[r]) begin
        out_row  = RW'(r);
        out_bits = (mode_q == RO_BOUNDARY) ? edge_map[r] : firing_map[r];
      end
    end
  end

  assign out_valid = |pending;
  assign out_last  = out_valid && ((pending & ~first_oh) == '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pending <= '0;
      mode_q  <= RO_REGION;
    end else if (start) begin
      pending <= row_firing;
      mode_q  <= mode;
    end else begin
      pending <= pending & ~first_oh;
    end
  end

endmodule
