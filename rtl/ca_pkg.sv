// Shared types and constants of the cellular-automaton region extractor.
//
// A pixel holds three register bits: `fired` (a boundary pixel, or a pixel of
// a region already extracted), `firing` (member of the region now growing) and
// `prev` (the value `firing` had one clock earlier). A pixel with neither
// `fired` nor `firing` set is unfired. The default image size is the 30 x 30
// pixels of the FPGA experiment; the same RTL scales to any M x N.
package ca_pkg;

  // Default image size: rows (M) and columns (N).
  localparam int unsigned DEF_ROWS = 30;
  localparam int unsigned DEF_COLS = 30;

  // Neighbour order on the four-bit neighbour buses.
  localparam int unsigned NB_N = 0;
  localparam int unsigned NB_E = 1;
  localparam int unsigned NB_S = 2;
  localparam int unsigned NB_W = 3;

  typedef struct packed {
    logic fired;   // b0: boundary or already extracted
    logic firing;  // b1: part of the region being grown
    logic prev;    // b2: firing one clock earlier
  } pixel_state_t;

  // Phases of the extraction sequence.
  typedef enum logic [2:0] {
    ST_IDLE   = 3'd0,  // waiting for a start request
    ST_INIT   = 3'd1,  // step (1): load the boundary image
    ST_DETECT = 3'd2,  // step (2)/(7): pick a starting pixel, or finish
    ST_EXPAND = 3'd3,  // steps (3)/(4): grow until nothing changes
    ST_READ   = 3'd4,  // step (5): read the firing region out
    ST_CLEAR  = 3'd5,  // step (6): firing pixels become fired
    ST_DONE   = 3'd6   // every region has been extracted
  } phase_t;

  // Readout selection.
  typedef enum logic {
    RO_REGION   = 1'b0,  // every firing pixel
    RO_BOUNDARY = 1'b1   // only firing pixels with a non-firing 4-neighbour
  } ro_mode_t;

endpackage
