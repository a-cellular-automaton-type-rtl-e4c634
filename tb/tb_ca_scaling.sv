// Processing time against image size. Square images of 8, 16, 24 and 40
// pixels a side are extracted by the full design, each checked region by
// region against the reference model, and the clocks taken by the
// five-region scene are printed per size. The time per region grows with the
// side length, so the scene's clock count should grow about linearly with the
// side (with the square root of the pixel count), which is checked: going from
// 16 to 40 pixels a side, 6.25 times the pixels, may at most multiply it by
// 40/16 plus a 25 % margin.
module tb_ca_scaling;
  localparam int N = 4;
  localparam int SIDE [N] = '{8, 16, 24, 40};
  logic fin [N];
  int   chk [N], fail [N], clk_s [N];
  int   checks = 0, failures = 0;

  for (genvar i = 0; i < N; i++) begin : g_size
    ca_extract_bench #(.ROWS(SIDE[i]), .COLS(SIDE[i]), .N_RANDOM(3)) u_bench (
      .finished(fin[i]), .checks(chk[i]), .failures(fail[i]), .scene_clocks(clk_s[i]));
  end

  initial begin
    #10;
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    for (int i = 0; i < N; i++) begin
      checks += chk[i];
      failures += fail[i];
    end
    checks++;
    if (real'(clk_s[3]) > real'(clk_s[1]) * (40.0 / 16.0) * 1.25) begin
      failures++;
      $display("FAIL: time grows faster than the side length");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
