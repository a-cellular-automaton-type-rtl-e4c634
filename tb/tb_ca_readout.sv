// Test of the row-serial readout on an 8 x 9 plane. Random firing planes
// (some rows left empty on purpose) are read out in both modes. The expected
// stream, the non-empty rows in increasing order with their pixels or their
// boundary pixels (firing with a 4-neighbour that is not firing or outside),
// is worked out here; `out_last` and the number of clocks, one per non-empty
// row, are checked too.
module tb_ca_readout;
  import ca_pkg::*;
  localparam int unsigned ROWS = 8;
  localparam int unsigned COLS = 9;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  ro_mode_t mode = RO_REGION;
  logic [ROWS-1:0] row_firing;
  logic [ROWS-1:0][COLS-1:0] firing_map = '0;
  logic out_valid, out_last;
  logic [2:0] out_row;
  logic [COLS-1:0] out_bits;
  int checks = 0, failures = 0, n_skip = 0;

  always #5 clk = ~clk;

  ca_readout #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  always_comb for (int r = 0; r < ROWS; r++) row_firing[r] = |firing_map[r];

  function automatic bit f(int r, int c);
    if (r < 0 || c < 0 || r >= ROWS || c >= COLS) return 1'b0;
    return firing_map[r][c];
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk(!out_valid, "valid after reset");
    for (int i = 0; i < 400; i++) begin
      int nrows, sent;
      nrows = 0; sent = 0;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++)
          firing_map[r][c] = ($urandom_range(3) == 0) && ($urandom_range(ROWS) > r % 4);
      if (i % 7 == 0) firing_map = '0;
      for (int r = 0; r < ROWS; r++) if (firing_map[r] != 0) nrows++;
      mode = ro_mode_t'(i % 2);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      mode = ro_mode_t'(~(i % 2));  // must have been latched
      for (int r = 0; r < ROWS; r++) begin
        logic [COLS-1:0] eb;
        if (firing_map[r] == 0) continue;
        for (int c = 0; c < COLS; c++)
          eb[c] = (i % 2 == 1) ? (f(r, c) && !(f(r-1, c) && f(r+1, c) && f(r, c-1) && f(r, c+1)))
                               : f(r, c);
        chk(out_valid, $sformatf("image %0d row %0d: not valid", i, r));
        chk(int'(out_row) == r, $sformatf("image %0d: row %0d, expected %0d", i, out_row, r));
        chk(out_bits == eb, $sformatf("image %0d row %0d: bits %h expected %h", i, r, out_bits, eb));
        sent++;
        chk(out_last == (sent == nrows), $sformatf("image %0d row %0d: last %b", i, r, out_last));
        @(negedge clk);
      end
      chk(!out_valid && !out_last, $sformatf("image %0d: readout did not stop after %0d rows", i, nrows));
      if (nrows > 0 && nrows < ROWS) n_skip++;
    end
    chk(n_skip > 0, "no row was skipped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
