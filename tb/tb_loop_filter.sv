`timescale 1ps / 1fs
// tb_loop_filter: self-checking test of the min/max averaging loop filter.
//
// Feeds a new code every reference cycle: first a dithering pattern around a
// locked value, as the controller produces it, then random codes, then a
// ramp. The test keeps its own max and min per window of K_WIN cycles and
// checks that the output changes to (max+min)/2 on the clock edge that takes
// the last sample of a window, holds in between, and that avg_valid pulses exactly then.
module tb_loop_filter;
  import adpll_pkg::*;

  localparam int unsigned K = 16;

  logic ref_clk = 1'b0;
  logic rst     = 1'b1;
  logic [COARSE_W-1:0] code_coarse = '0;
  logic [FINE_W-1:0]   code_fine   = '0;
  logic [COARSE_W-1:0] avg_coarse;
  logic [FINE_W-1:0]   avg_fine;
  logic avg_valid;

  int checks   = 0;
  int failures = 0;

  loop_filter dut (
    .ref_clk, .rst, .code_coarse, .code_fine, .avg_coarse, .avg_fine, .avg_valid
  );

  always #5000 ref_clk = ~ref_clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    int mx, mn, expect_avg, c;
    @(negedge ref_clk);
    check({avg_coarse, avg_fine} == 12'd2080, "reset value");
    rst = 1'b0;
    expect_avg = 2080;
    for (int w = 0; w < 60; w++) begin
      mx = -1;
      mn = 1 << 20;
      for (int i = 0; i < int'(K); i++) begin
        if (w < 20)      c = 3419 + int'($urandom_range(0, 4)) - 2;
        else if (w < 40) c = int'($urandom_range(0, 4095));
        else             c = (w * int'(K) + i) * 7 % 4096;
        {code_coarse, code_fine} = 12'(c);
        if (c > mx) mx = c;
        if (c < mn) mn = c;
        @(negedge ref_clk);
        if (i == int'(K) - 1) expect_avg = (mx + mn) / 2;
        check({avg_coarse, avg_fine} == 12'(expect_avg),
              $sformatf("window %0d sample %0d: avg %0d expected %0d", w, i,
                        {avg_coarse, avg_fine}, expect_avg));
        check(avg_valid == (i == int'(K) - 1), $sformatf("avg_valid at w %0d i %0d", w, i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd100_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
