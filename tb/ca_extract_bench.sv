// Reusable end-to-end bench for one image size, used by the scaling test.
// Same checks as the 12 x 16 end-to-end test: every region's rows and bits in
// both readout modes, the region count, and the processing time against the
// reference model. It also reports the clocks the five-region scene needs.
// `finished` rises when it is done; `checks`/`failures` hold its tally.
module ca_extract_bench
  import ca_pkg::*;
  import ca_ref_pkg::*;
#(
  parameter int unsigned ROWS     = 12,
  parameter int unsigned COLS     = 16,
  parameter int unsigned N_RANDOM = 4
) (
  output logic finished,
  output int   checks,
  output int   failures,
  output int   scene_clocks
);
  localparam int unsigned RW   = $clog2(ROWS);
  localparam int unsigned CW   = $clog2(COLS);
  localparam int unsigned ID_W = $clog2(ROWS * COLS + 1);

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  ro_mode_t ro_mode = RO_REGION;
  logic [ROWS-1:0][COLS-1:0] boundary = '0;
  phase_t phase;
  logic busy, done, out_valid, out_last;
  logic [ID_W-1:0] region_id;
  logic [23:0] cycles;
  logic [RW-1:0] out_row, seed_row;
  logic [CW-1:0] seed_col;
  logic [COLS-1:0] out_bits;

  int n_multi = 0, n_boundary = 0, n_skip = 0, n_none = 0, n_restart = 0;

  always #5 clk = ~clk;

  ca_region_extractor #(.ROWS(ROWS), .COLS(COLS)) dut (
    .clk, .rst_n, .start, .ro_mode, .boundary, .phase, .busy, .done,
    .region_id, .cycles, .out_valid, .out_row, .out_bits, .out_last,
    .seed_row, .seed_col
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic run_image(ca_ref m, ro_mode_t mode);
    int k = 0, t = 0, next_row = 0, rows_seen = 0;
    m.label_image();
    foreach (m.bnd[r, c]) boundary[r][c] = m.bnd[r][c];
    ro_mode = mode;
    if (done) n_restart++;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    // Now in INIT.
    while (!done && t < 100000) begin
      t++;
      if (out_valid) begin
        check(k < m.regs.size(), "more regions than expected");
        if (k < m.regs.size()) begin
          logic [COLS-1:0] exp_bits;
          check(region_id == ID_W'(k + 1), $sformatf("region id %0d, expected %0d", region_id, k + 1));
          while (next_row < ROWS && !m.regs[k].has_row(next_row)) next_row++;
          check(int'(out_row) == next_row, $sformatf("region %0d: row %0d, expected %0d", k, out_row, next_row));
          for (int c = 0; c < COLS; c++)
            exp_bits[c] = (mode == RO_BOUNDARY) ? m.regs[k].is_edge(next_row, c)
                                                : m.regs[k].pix[next_row][c];
          check(out_bits == exp_bits, $sformatf("region %0d row %0d: bits %h, expected %h", k, next_row, out_bits, exp_bits));
          next_row++;
          rows_seen++;
          if (out_last) begin
            check(rows_seen == m.regs[k].rows_spanned(), "rows sent differ from rows spanned");
            if (rows_seen < ROWS) n_skip++;
            k++; next_row = 0; rows_seen = 0;
          end
        end
      end
      @(negedge clk);
    end
    check(done, "extraction did not finish");
    check(k == m.regs.size(), $sformatf("%0d regions read, expected %0d", k, m.regs.size()));
    check(int'(region_id) == m.regs.size(), "final region count");
    check(int'(cycles) == m.exp_cycles(), $sformatf("cycles %0d, expected %0d", cycles, m.exp_cycles()));
    check(t == m.exp_cycles(), $sformatf("measured %0d clocks, expected %0d", t, m.exp_cycles()));
    if (m.regs.size() > 1) n_multi++;
    if (m.regs.size() == 0) n_none++;
    if (mode == RO_BOUNDARY && m.regs.size() > 0) n_boundary++;
  endtask

  initial begin
    automatic ca_ref m = new(ROWS, COLS);
    finished = 1'b0; checks = 0; failures = 0; scene_clocks = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(phase == ST_IDLE && !busy && !done, "idle after reset");

    m.gen_scene();
    run_image(m, RO_REGION);
    check(m.regs.size() == 5, "scene has five regions");
    scene_clocks = int'(cycles);
    run_image(m, RO_BOUNDARY);

    foreach (m.bnd[r, c]) m.bnd[r][c] = 1'b1;
    run_image(m, RO_REGION);

    m.clear_img();
    run_image(m, RO_BOUNDARY);

    for (int i = 0; i < N_RANDOM; i++) begin
      m.gen_random($urandom_range(3), $urandom_range(4), $urandom_range(25));
      run_image(m, ro_mode_t'(i % 2));
    end

    check(n_multi > 0, "no image with several regions");
    check(n_boundary > 0, "boundary readout never used");
    check(n_skip > 0, "no readout skipped a row");
    check(n_none > 0, "no image without regions");
    check(n_restart > 0, "no restart from DONE");
    $display("%0d x %0d: scene of 5 regions took %0d clocks (%0.2f us at 25 MHz)",
             ROWS, COLS, scene_clocks, real'(scene_clocks) * 0.04);
    finished = 1'b1;
  end
endmodule
