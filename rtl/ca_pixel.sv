// One pixel of the cellular-automaton region extractor.
//
// The pixel holds a three-bit register: b0 `fired`, b1 `firing` and b2
// `prev`, the copy of b1 taken one clock earlier. The exclusive-OR of b1 and
// b2 is the change output `bx`: it is 1 in the clock after the pixel started
// firing, so the OR of all `bx` tells whether the firing region still grows.
// Four switches pass the firing outputs of the north, east, south and west
// neighbours into the pixel; they are closed only while expansion is enabled,
// and an unfired pixel that sees a firing neighbour through them fires.
//
// Commands, all synchronous, in priority order:
//   load      : b0 <= boundary_in, b1 <= 0 (initialisation, step 1)
//   clear     : a firing pixel becomes fired (step 6)
//   set_start : this unfired pixel fires (starting pixel, step 2)
//   expand    : this unfired pixel fires if a neighbour fires (step 3)
// b2 follows b1 on every clock, so `changed` is valid one clock after an
// update. Reset clears all three bits. The register, the XOR and the four
// switches follow the document's pixel circuit; the command priority and the
// synchronous reset are this design's choices.
module ca_pixel
  import ca_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  logic       boundary_in,
  input  logic       clear,
  input  logic       set_start,
  input  logic       expand,
  input  logic [3:0] nbr_firing,  // firing outputs of neighbours N, E, S, W
  output logic       unfired,
  output logic       firing,
  output logic       changed      // bx = b1 xor b2
);

  pixel_state_t st;
  logic         nbr_in;

  // The four switches: closed during expansion only.
  assign nbr_in = expand & (|nbr_firing);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= '0;
    end else begin
      st.prev <= st.firing;
      if (load) begin
        st.fired  <= boundary_in;
        st.firing <= 1'b0;
      end else if (clear) begin
        if (st.firing) begin
          st.fired  <= 1'b1;
          st.firing <= 1'b0;
        end
      end else if (!st.fired && !st.firing && (set_start || nbr_in)) begin
        st.firing <= 1'b1;
      end
    end
  end

  assign unfired = ~st.fired & ~st.firing;
  assign firing  = st.firing;
  assign changed = st.firing ^ st.prev;

endmodule
