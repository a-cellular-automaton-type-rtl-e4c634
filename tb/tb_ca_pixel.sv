// Test of one pixel cell. Random commands and neighbour inputs are applied
// for several thousand clocks; a behavioural model of the three state bits,
// written from the rules (load, clear, start, expansion through the four
// neighbour inputs, one-clock-old copy), predicts the unfired, firing and
// change outputs, which are compared after every clock.
module tb_ca_pixel;
  logic clk = 1'b0, rst_n = 1'b0;
  logic load = 0, boundary_in = 0, clear = 0, set_start = 0, expand = 0;
  logic [3:0] nbr_firing = '0;
  logic unfired, firing, changed;
  int checks = 0, failures = 0;
  bit m_fired, m_firing, m_prev;
  int n_grow = 0, n_clear = 0, n_start = 0;

  always #5 clk = ~clk;

  ca_pixel dut (.*);

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    m_fired = 0; m_firing = 0; m_prev = 0;
    for (int i = 0; i < 5000; i++) begin
      bit was_unfired;
      // Commands: mostly one at a time, as the controller issues them.
      load        = ($urandom_range(15) == 0);
      boundary_in = $urandom_range(1) != 0;
      clear       = ($urandom_range(15) == 0);
      set_start   = ($urandom_range(7) == 0);
      expand      = ($urandom_range(1) != 0);
      nbr_firing  = 4'($urandom_range(15)) & {4{$urandom_range(3) == 0}};
      @(posedge clk);
      was_unfired = !m_fired && !m_firing;
      m_prev = m_firing;
      if (load) begin
        m_fired = boundary_in; m_firing = 0;
      end else if (clear) begin
        if (m_firing) begin m_fired = 1; m_firing = 0; n_clear++; end
      end else if (was_unfired && set_start) begin
        m_firing = 1; n_start++;
      end else if (was_unfired && expand && nbr_firing != 0) begin
        m_firing = 1; n_grow++;
      end
      @(negedge clk);
      checks++;
      if (unfired !== (!m_fired && !m_firing) || firing !== m_firing ||
          changed !== (m_firing ^ m_prev)) begin
        failures++;
        if (failures < 10)
          $display("FAIL step %0d: got u=%b f=%b x=%b, expected f=%b fired=%b prev=%b",
                   i, unfired, firing, changed, m_firing, m_fired, m_prev);
      end
    end
    // Reset clears the state.
    rst_n = 1'b0;
    @(negedge clk);
    checks++;
    if (!(unfired && !firing && !changed)) failures++;
    checks++;
    if (n_grow == 0 || n_clear == 0 || n_start == 0) failures++;
    $display("grow=%0d clear=%0d start=%0d", n_grow, n_clear, n_start);
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
