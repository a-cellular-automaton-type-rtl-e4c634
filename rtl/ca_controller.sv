// Sequencer of the region extraction algorithm.
//
// After `start`, the controller initialises the pixel plane from the boundary
// image (one clock), then repeats for every region:
//   DETECT : if an unfired pixel is left, mark the chosen starting pixel firing;
//            otherwise the extraction is finished (DONE);
//   EXPAND : let the firing region grow one pixel per clock for as long as the
//            change lines report that the previous clock changed some pixel;
//            the first clock with no change starts the readout;
//   READ   : wait for the readout to send its last row;
//   CLEAR  : turn the firing pixels into fired ones (one clock).
// `region_id` counts the regions found so far (the current one during READ),
// `cycles` counts clocks from the start request to DONE: the processing time.
// In DONE, `done` stays high until the next `start`, which restarts the whole
// sequence with a fresh image.
//
// Step order and end test follow the document; the state encoding, the one
// clock each for INIT, DETECT and CLEAR and the counters are this design's.
module ca_controller
  import ca_pkg::*;
#(
  parameter int unsigned ID_W  = 10,  // width of the region counter
  parameter int unsigned CYC_W = 20   // width of the cycle counter
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             found,        // an unfired pixel is left
  input  logic             any_changed,  // OR of all change lines
  input  logic             ro_last,      // readout sends its last row
  output phase_t           phase,
  output logic             load,
  output logic             set_start,
  output logic             expand,
  output logic             ro_start,
  output logic             clear,
  output logic             busy,
  output logic             done,
  output logic [ID_W-1:0]  region_id,
  output logic [CYC_W-1:0] cycles
);

  phase_t phase_d;

  always_comb begin
    phase_d   = phase;
    load      = 1'b0;
    set_start = 1'b0;
    expand    = 1'b0;
    ro_start  = 1'b0;
    clear     = 1'b0;
    unique case (phase)
      ST_IDLE:   if (start) phase_d = ST_INIT;
      ST_INIT: begin
        load    = 1'b1;
        phase_d = ST_DETECT;
      end
      ST_DETECT: begin
        if (found) begin
          set_start = 1'b1;
          phase_d   = ST_EXPAND;
        end else begin
          phase_d   = ST_DONE;
        end
      end
      ST_EXPAND: begin
        if (any_changed) begin
          expand   = 1'b1;
        end else begin
          ro_start = 1'b1;
          phase_d  = ST_READ;
        end
      end
      ST_READ:   if (ro_last) phase_d = ST_CLEAR;
      ST_CLEAR: begin
        clear   = 1'b1;
        phase_d = ST_DETECT;
      end
      ST_DONE:   if (start) phase_d = ST_INIT;
      default:   phase_d = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase     <= ST_IDLE;
      region_id <= '0;
      cycles    <= '0;
    end else begin
      phase <= phase_d;
      if ((phase == ST_IDLE || phase == ST_DONE) && start) begin
        region_id <= '0;
        cycles    <= '0;
      end else if (phase != ST_IDLE && phase != ST_DONE) begin
        cycles <= cycles + CYC_W'(1);
        if (set_start) region_id <= region_id + ID_W'(1);
      end
    end
  end

  assign busy = (phase != ST_IDLE) && (phase != ST_DONE);
  assign done = (phase == ST_DONE);

  // A readout is only started from the expansion phase.
  a_ro_start_in_expand: assert property (@(posedge clk) disable iff (!rst_n)
    ro_start |-> phase == ST_EXPAND);

endmodule
