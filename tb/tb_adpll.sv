`timescale 1ps / 1fs
// tb_adpll: end-to-end test of the all-digital PLL at its default parameters.
//
// For each operating point (reference period, division ratio M) the test
// resets the PLL, lets it acquire and then checks:
//   * lock rises within m*(2*log2(4096)-1) = 46 reference cycles of reset;
//   * after settling, the divided INNER DCO clock makes exactly one rising
//     edge per reference cycle on average over a long window (phase lock);
//   * the OUTPUT DCO runs at M times the reference frequency within 0.5 %
//     (the output code is the loop filter's average, so it is within a few
//     fine steps of the ideal code);
//   * the OUTPUT DCO code stays within a small band once settled.
// The operating points are the 5 MHz x 40 = 200 MHz case of the design's
// transient plot (whose first search codes 2080, 3104, 4095, 3583 are also
// checked), and 45 MHz, 450 MHz and 510 MHz outputs (the ends of the
// measured range). Every mechanism of the loop is counted over the whole
// run and must have happened at least once: up and down search steps, step
// halving on a reversal, saturation at the code limit, the change to phase
// mode, phase-mode up and down steps, an update with no request (dead zone)
// and a loop filter output change.
module tb_adpll;
  import adpll_pkg::*;

  logic ref_clk = 1'b0;
  logic rst     = 1'b1;
  logic [7:0] div_m = 8'd40;
  logic out_clk, lock, dco_out_divm, p_up_n, p_down_n;
  logic [COARSE_W-1:0] coarse, avg_coarse;
  logic [FINE_W-1:0]   fine, avg_fine;

  real ref_half = 100_000.0;

  int checks   = 0;
  int failures = 0;

  // Mechanism counters.
  int n_freq_up = 0, n_freq_down = 0, n_halve = 0, n_sat = 0, n_lock = 0;
  int n_phase_up = 0, n_phase_down = 0, n_idle = 0, n_lf = 0;

  int n_out = 0, n_div = 0, n_ref = 0;

  adpll dut (
    .ref_clk, .rst, .div_m, .out_clk, .lock, .coarse, .fine, .avg_coarse, .avg_fine,
    .dco_out_divm, .p_up_n, .p_down_n, .search_step(), .avg_valid()
  );

  always begin
    #(ref_half) ref_clk = ~ref_clk;
  end

  always @(posedge out_clk)      n_out++;
  always @(posedge dco_out_divm) n_div++;
  always @(posedge ref_clk)      n_ref++;

  // Watch the controller's decisions at every update.
  logic [CODE_W-1:0] code_prev;
  always @(posedge ref_clk) begin
    if (!rst && dut.u_ctrl.update) begin
      if (dut.u_ctrl.dir == DIR_NONE) begin
        if (dut.u_ctrl.mode_q == MODE_PHASE) n_idle++;
      end else if (dut.u_ctrl.mode_q == MODE_FREQ) begin
        if (dut.u_ctrl.dir == DIR_UP) n_freq_up++; else n_freq_down++;
        if (dut.u_ctrl.step_eff != dut.u_ctrl.step_q) n_halve++;
        if ((dut.u_ctrl.dir == DIR_UP && dut.u_ctrl.sum[CODE_W]) ||
            (dut.u_ctrl.dir == DIR_DOWN && dut.u_ctrl.code_q < dut.u_ctrl.step_eff)) n_sat++;
      end else begin
        if (dut.u_ctrl.dir == DIR_UP) n_phase_up++; else n_phase_down++;
      end
    end
    if (!rst && dut.avg_valid && {avg_coarse, avg_fine} != code_prev) n_lf++;
    code_prev <= {avg_coarse, avg_fine};
  end

  always @(posedge lock) n_lock++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Codes seen at the first acquisition updates of the current run.
  int first_codes[$];
  always @(posedge ref_clk) begin
    if (!rst && !lock && dut.u_ctrl.update && first_codes.size() < 4)
      first_codes.push_back(int'({coarse, fine}));
  end

  task automatic run_point(real t_ref_ps, int m, int settle, int window);
    int lock_cyc, r0, o0, d0, cmin, cmax, c;
    real f_ref, f_out, err;
    ref_half = t_ref_ps / 2.0;
    div_m    = 8'(m);
    rst      = 1'b1;
    repeat (4) @(posedge ref_clk);
    @(negedge ref_clk);
    first_codes.delete();
    rst = 1'b0;
    lock_cyc = 0;
    while (!lock && lock_cyc < 200) begin
      @(posedge ref_clk);
      lock_cyc++;
    end
    check(lock && lock_cyc <= 46, $sformatf("M=%0d: lock after %0d reference cycles", m, lock_cyc));
    repeat (settle) @(posedge ref_clk);
    r0 = n_ref; o0 = n_out; d0 = n_div;
    cmin = 4096; cmax = -1;
    repeat (window) begin
      @(posedge ref_clk);
      c = int'({avg_coarse, avg_fine});
      if (c < cmin) cmin = c;
      if (c > cmax) cmax = c;
    end
    f_ref = 1.0e6 / t_ref_ps;
    f_out = f_ref * real'(n_out - o0) / real'(n_ref - r0);
    err   = (f_out - f_ref * m) / (f_ref * m);
    check(n_div - d0 >= window - 1 && n_div - d0 <= window + 1,
          $sformatf("M=%0d: %0d divided edges in %0d reference cycles", m, n_div - d0, window));
    check(err < 0.005 && err > -0.005,
          $sformatf("M=%0d: output %0.3f MHz, target %0.3f MHz", m, f_out, f_ref * m));
    check(cmax - cmin <= 8, $sformatf("M=%0d: output code wandered %0d..%0d", m, cmin, cmax));
    $display("point %0.3f MHz x %0d: lock %0d cycles, output %0.3f MHz, code %0d..%0d",
             f_ref, m, lock_cyc, f_out, cmin, cmax);
  endtask

  initial begin
    run_point(200_000.0, 40, 150, 256);   // 5 MHz x 40 = 200 MHz
    // The start of the search at 200 MHz: 2080 (32/32), +1024 -> 3104
    // (48/32), +1024 saturating at 4095 (63/63), reversal: -512 -> 3583
    // (55/63), as in the design's transient plot at this operating point.
    check(first_codes.size() == 4 && first_codes[0] == 2080 && first_codes[1] == 3104 &&
          first_codes[2] == 4095 && first_codes[3] == 3583,
          $sformatf("200 MHz search start %p", first_codes));
    run_point(200_000.0, 9, 150, 256);    // 45 MHz
    run_point(20_000.0, 9, 150, 512);     // 50 MHz x 9 = 450 MHz
    run_point(100_000.0, 51, 150, 256);   // 10 MHz x 51 = 510 MHz
    check(n_freq_up > 0,    "no search step up");
    check(n_freq_down > 0,  "no search step down");
    check(n_halve > 0,      "no step halving");
    check(n_sat > 0,        "no saturation at a code limit");
    check(n_lock == 4,      $sformatf("lock rose %0d times", n_lock));
    check(n_phase_up > 0,   "no phase-mode step up");
    check(n_phase_down > 0, "no phase-mode step down");
    check(n_idle > 0,       "no update inside the dead zone");
    check(n_lf > 0,         "no loop filter update");
    $display("mechanisms: freq up %0d down %0d halve %0d saturate %0d lock %0d phase up %0d down %0d dead zone %0d filter %0d",
             n_freq_up, n_freq_down, n_halve, n_sat, n_lock, n_phase_up, n_phase_down, n_idle, n_lf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd1_000_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
