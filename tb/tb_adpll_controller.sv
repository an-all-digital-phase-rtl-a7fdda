`timescale 1ps / 1fs
// tb_adpll_controller: self-checking test of the ADPLL controller.
//
// The detector is replaced by an ideal comparator: the loop "wants" a DCO
// frequency that lies between codes t and t+1, so the flags ask for UP while
// the code is <= t and for DOWN above it. For a list of targets (both ends
// of the range, the worst case and random values) the test resets the
// controller, follows every code update against its own model of the
// adaptive search (start {32,32}, first step n/4, halve on reversal, done at
// step 1, then single integrated steps plus a one-step proportional kick),
// and checks:
//   * the code after every update, and updates only every UPDATE_M cycles;
//   * lock rises when the model finishes the search, no later than the
//     bound m*(2*log2(n)-1) = 46 reference cycles;
//   * the DCO restart is high for the cycle after each acquisition update
//     (and after reset) and never once locked;
//   * after lock the code stays within t-1 .. t+2;
//   * with both flags idle in phase mode the code does not move.
module tb_adpll_controller;
  import adpll_pkg::*;

  localparam int unsigned M_UPD = 2;
  localparam int unsigned N     = 1 << CODE_W;
  localparam int          BOUND = M_UPD * (2 * CODE_W - 1);  // 46

  logic ref_clk = 1'b0;
  logic rst     = 1'b1;
  logic p_up_n, p_down_n;
  logic [COARSE_W-1:0] coarse;
  logic [FINE_W-1:0]   fine;
  logic lock;
  logic dco_restart;
  logic [CODE_W-1:0] search_step;

  int checks   = 0;
  int failures = 0;
  int target   = 0;
  bit idle     = 1'b0;
  int worst    = 0;

  adpll_controller #(.UPDATE_M(M_UPD)) dut (
    .ref_clk, .rst, .p_up_n, .p_down_n, .coarse, .fine, .lock, .dco_restart, .search_step
  );

  always #5000 ref_clk = ~ref_clk;

  wire [CODE_W-1:0] code = {coarse, fine};

  always_comb begin
    if (idle) begin
      p_up_n   = 1'b1;
      p_down_n = 1'b1;
    end else begin
      p_up_n   = !(int'(code) <= target);
      p_down_n =  (int'(code) <= target);
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0d: %s", target, what);
    end
  endtask

  task automatic run_target(int t);
    int m_code, m_out, m_step, m_last, dir, cyc, lock_cyc;
    bit m_done, m_restart;
    target = t;
    rst = 1'b1;
    @(negedge ref_clk);
    @(negedge ref_clk);
    rst = 1'b0;
    m_code = 32 * 64 + 32;
    m_out  = m_code;
    m_step = N / 4;
    m_last = 0;
    m_done = 1'b0;
    lock_cyc = -1;
    check(code == CODE_W'(m_code) && !lock && dco_restart, "reset state");
    for (cyc = 1; cyc <= 80; cyc++) begin
      @(posedge ref_clk);
      m_restart = 1'b0;
      if (cyc % M_UPD == 0) begin
        dir = (m_out <= t) ? 1 : -1;
        if (m_done) begin
          m_code += dir;
          if (m_code < 0) m_code = 0;
          if (m_code > N - 1) m_code = N - 1;
          m_out = m_code + dir;
        end else begin
          if (m_last != 0 && dir != m_last) m_step /= 2;
          m_last = dir;
          m_code += dir * m_step;
          if (m_code < 0) m_code = 0;
          if (m_code > N - 1) m_code = N - 1;
          m_out = m_code;
          if (m_step == 1) m_done = 1'b1;
          else             m_restart = 1'b1;
        end
        if (m_out < 0) m_out = 0;
        if (m_out > N - 1) m_out = N - 1;
      end
      @(negedge ref_clk);
      check(code == CODE_W'(m_out), $sformatf("cycle %0d code %0d expected %0d", cyc, code, m_out));
      check(dco_restart == m_restart, $sformatf("cycle %0d restart %0b", cyc, dco_restart));
      check(lock == m_done, $sformatf("cycle %0d lock %0b expected %0b", cyc, lock, m_done));
      if (lock && lock_cyc < 0) lock_cyc = cyc;
    end
    check(lock_cyc > 0 && lock_cyc <= BOUND, $sformatf("lock after %0d cycles", lock_cyc));
    if (lock_cyc > worst) worst = lock_cyc;
    check(int'(code) >= t - 1 && int'(code) <= t + 2, $sformatf("final code %0d", code));
  endtask

  initial begin
    int tl[$];
    tl = '{0, 1, 2079, 2080, 3412, 3419, 4093, 4094, 1023, 3072};
    for (int i = 0; i < 150; i++) tl.push_back($urandom_range(0, N - 2));
    foreach (tl[i]) run_target(tl[i]);
    // Idle detector: the code holds.
    begin
      logic [CODE_W-1:0] held;
      idle = 1'b1;
      repeat (2) @(posedge ref_clk);
      @(negedge ref_clk);
      held = code;
      repeat (10) @(posedge ref_clk);
      @(negedge ref_clk);
      check(code == held, "code moved with idle flags");
      idle = 1'b0;
    end
    $display("worst-case lock time %0d reference cycles (bound %0d)", worst, BOUND);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd200_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
