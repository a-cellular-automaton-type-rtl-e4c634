// Test of the pixel plane at 7 x 9. A random boundary image is loaded, a
// random unfired pixel is made the starting pixel and the plane is expanded
// clock by clock. After k expansion clocks the firing pixels must be exactly
// those of the seed's region within 4-neighbour distance k, found here by a
// breadth-first search; the change plane (seen through the row lines) must
// be the pixels at distance exactly k, and the unfired and firing row lines
// must match the maps. After the growth stops the plane is cleared, and the
// firing pixels must have become fired.
module tb_ca_pixel_array;
  localparam int unsigned ROWS = 7;
  localparam int unsigned COLS = 9;
  logic clk = 1'b0, rst_n = 1'b0;
  logic load = 0, clear = 0, set_start = 0, expand = 0;
  logic [ROWS-1:0][COLS-1:0] boundary = '0;
  logic [ROWS-1:0] start_row_oh = '0;
  logic [COLS-1:0] start_col_oh = '0;
  logic [ROWS-1:0][COLS-1:0] unfired_map, firing_map;
  logic [ROWS-1:0] row_unfired, row_firing, row_changed;
  int checks = 0, failures = 0;
  int dst[ROWS][COLS];
  bit fired_m[ROWS][COLS];
  logic [ROWS-1:0] crow;

  always #5 clk = ~clk;

  ca_pixel_array #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // Distances from the seed through unfired pixels, -1 where unreachable.
  task automatic bfs(int sr, int sc);
    int qr[$], qc[$];
    foreach (dst[r, c]) dst[r][c] = -1;
    dst[sr][sc] = 0;
    qr.push_back(sr); qc.push_back(sc);
    while (qr.size() > 0) begin
      int r = qr.pop_front(), c = qc.pop_front();
      int nr[4] = '{r-1, r+1, r, r};
      int nc[4] = '{c, c, c-1, c+1};
      for (int k = 0; k < 4; k++)
        if (nr[k] >= 0 && nr[k] < ROWS && nc[k] >= 0 && nc[k] < COLS &&
            !fired_m[nr[k]][nc[k]] && dst[nr[k]][nc[k]] < 0) begin
          dst[nr[k]][nc[k]] = dst[r][c] + 1;
          qr.push_back(nr[k]); qc.push_back(nc[k]);
        end
    end
  endtask

  task automatic check_maps(int k, string what, logic [ROWS-1:0] cleared_rows = '0);
    logic [ROWS-1:0][COLS-1:0] ef, eu;
    logic [ROWS-1:0] ech;
    for (int r = 0; r < ROWS; r++) begin
      ech[r] = 1'b0;
      for (int c = 0; c < COLS; c++) begin
        ef[r][c] = (k >= 0) && dst[r][c] >= 0 && dst[r][c] <= k;
        eu[r][c] = !fired_m[r][c] && !ef[r][c];
        if (k >= 0 && dst[r][c] == k) ech[r] = 1'b1;
      end
      if (cleared_rows[r]) ech[r] = 1'b1;
    end
    chk(firing_map == ef, $sformatf("%s step %0d: firing map", what, k));
    chk(unfired_map == eu, $sformatf("%s step %0d: unfired map", what, k));
    for (int r = 0; r < ROWS; r++) begin
      chk(row_firing[r] == (ef[r] != 0) && row_unfired[r] == (eu[r] != 0),
          $sformatf("%s step %0d: row lines %0d", what, k, r));
    end
    chk(row_changed == ech, $sformatf("%s step %0d: change lines %b, expected %b", what, k, row_changed, ech));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int img = 0; img < 30; img++) begin
      int pct;
      pct = 10 + (img % 4) * 10;
      foreach (fired_m[r, c]) fired_m[r][c] = ($urandom_range(99) < pct);
      foreach (fired_m[r, c]) boundary[r][c] = fired_m[r][c];
      load = 1'b1; @(negedge clk); load = 1'b0;
      boundary = ~boundary;  // must have been taken already
      foreach (dst[r, c]) dst[r][c] = -1;
      @(negedge clk);
      check_maps(-1, "after load");
      // Grow and clear up to three regions of this image.
      for (int reg_n = 0; reg_n < 3; reg_n++) begin
        int sr, sc, k;
        sr = -1; sc = -1; k = 0;
        for (int tries = 0; tries < 200 && sr < 0; tries++) begin
          int r, c;
          r = $urandom_range(ROWS - 1);
          c = $urandom_range(COLS - 1);
          if (!fired_m[r][c]) begin sr = r; sc = c; end
        end
        if (sr < 0) break;
        bfs(sr, sc);
        start_row_oh = ROWS'(1) << sr;
        start_col_oh = COLS'(1) << sc;
        set_start = 1'b1; @(negedge clk); set_start = 1'b0;
        check_maps(0, "seed");
        while (row_changed != 0 && k < ROWS * COLS) begin
          expand = 1'b1; @(negedge clk); expand = 1'b0;
          k++;
          check_maps(k, "expand");
        end
        // Clear: the region becomes fired.
        clear = 1'b1; @(negedge clk); clear = 1'b0;
        crow = '0;
        foreach (dst[r, c]) if (dst[r][c] >= 0) begin fired_m[r][c] = 1'b1; crow[r] = 1'b1; end
        foreach (dst[r, c]) dst[r][c] = -1;
        chk(firing_map == '0, "firing left after clear");
        check_maps(-1, "after clear", crow);
        @(negedge clk);
        check_maps(-1, "idle after clear");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
