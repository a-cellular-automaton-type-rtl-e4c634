// Test of the step sequencer. The testbench plays the pixel plane and the
// readout: it answers `found`, `any_changed` and `ro_last` and checks, clock
// by clock, the phase and every command output against the expected sequence
// INIT, then per region DETECT, EXPAND (as long as changes are reported, plus
// the clock that sees none), READ (until the last row), CLEAR, and finally
// DETECT with nothing found and DONE. The region counter and the cycle
// counter are checked against the numbers of clocks spent.
module tb_ca_controller;
  import ca_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic found = 1'b0, any_changed = 1'b0, ro_last = 1'b0;
  phase_t phase;
  logic load, set_start, expand, ro_start, clear, busy, done;
  logic [9:0] region_id;
  logic [19:0] cycles;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ca_controller dut (.*);

  task automatic expect_out(phase_t p, logic [5:0] cmd, string what);
    // cmd = {load, set_start, expand, ro_start, clear, busy}
    checks++;
    if (phase != p || {load, set_start, expand, ro_start, clear, busy} != cmd) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: phase %s cmd %b, expected %s %b", what, phase.name(),
                 {load, set_start, expand, ro_start, clear, busy}, p.name(), cmd);
    end
  endtask

  task automatic run(int nreg, int seed);
    int t = 0;
    start = 1'b1;
    #1;
    expect_out(done ? ST_DONE : ST_IDLE, 6'b000000, "before start");
    @(negedge clk); start = 1'b0;
    expect_out(ST_INIT, 6'b100001, "init"); t++;
    @(negedge clk);
    for (int k = 0; k < nreg; k++) begin
      int ne, nr;
      ne = 1 + (seed + k) % 5;
      nr = 1 + (seed * 3 + k) % 4;
      found = 1'b1; #1;
      expect_out(ST_DETECT, 6'b010001, "detect"); t++;
      @(negedge clk); found = 1'b0;
      for (int e = 0; e < ne; e++) begin
        any_changed = 1'b1; #1;
        expect_out(ST_EXPAND, 6'b001001, "expand"); t++;
        @(negedge clk);
      end
      any_changed = 1'b0; #1;
      expect_out(ST_EXPAND, 6'b000101, "end of expansion"); t++;
      @(negedge clk);
      for (int j = 0; j < nr; j++) begin
        ro_last = (j == nr - 1); #1;
        expect_out(ST_READ, 6'b000001, "read"); t++;
        checks++;
        if (int'(region_id) != k + 1) failures++;
        @(negedge clk);
      end
      ro_last = 1'b0;
      expect_out(ST_CLEAR, 6'b000011, "clear"); t++;
      @(negedge clk);
    end
    found = 1'b0; #1;
    expect_out(ST_DETECT, 6'b000001, "final detect"); t++;
    @(negedge clk);
    expect_out(ST_DONE, 6'b000000, "done");
    checks++;
    if (!done || int'(region_id) != nreg || int'(cycles) != t) begin
      failures++;
      $display("FAIL totals: done %b regions %0d/%0d cycles %0d/%0d", done, region_id, nreg, cycles, t);
    end
    repeat (3) @(negedge clk);
    checks++;
    if (!done || phase != ST_DONE) failures++;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    expect_out(ST_IDLE, 6'b000000, "idle");
    run(3, 1);
    run(0, 0);
    run(6, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
