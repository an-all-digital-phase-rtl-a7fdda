`timescale 1ps / 1fs
// adpll_controller: frequency and phase acquisition for the all-digital PLL.
//
// Runs on the reference clock and moves the 12-bit DCO code {coarse, fine}
// once every UPDATE_M reference cycles (m):
//
//   * Frequency acquisition (after reset). The code starts at CODE_START in
//     the middle of the DCO range with a search step of n/4 (n = 2**CODE_W
//     codes). If the DCO is too slow the step is added, if it is too fast
//     the step is subtracted; the code saturates at 0 and 2**CODE_W-1.
//     Whenever the decision reverses (up after down or down after up) the
//     step is halved before it is applied. When the step has come down to
//     1 (one fine step) acquisition is over.
//   * Phase acquisition / maintenance. The code moves by one fine step per
//     update, up while the detector's UP flag is low, down while its DOWN
//     flag is low, and not at all when neither is (dead zone). lock is high
//     in this mode. Phase is the integral of frequency, so a loop that only
//     integrates the detector's sign into the code oscillates with growing
//     amplitude; to damp it, the code sent to the DCO is the integrated code
//     plus PHASE_KICK fine steps in the direction of the last request
//     (a proportional term). With PHASE_KICK = 0 the loop is the bare
//     integrating one.
//
// Frequency comparison during acquisition. A phase detector compares the
// nearest edges, so a phase error left over from the previous code would
// mislead the search. The controller therefore restarts the INNER DCO and
// the divider for every comparison: dco_restart is raised at each
// acquisition update and dropped UPDATE_M-1 cycles later, on a reference
// edge, so that the divided clock's first edge coincides with that
// reference edge. Its next edge then lands before the following reference
// edge (DCO too fast: the DOWN flag is low at the update) or after it (too
// slow: it is not). With UPDATE_M = 2 and a 12-bit code the search takes at
// most 21 updates, 42 reference cycles, inside the bound
// m*(2*log2(n)-1) = 46 cycles.
//
// Interface: p_up_n / p_down_n are the detector's active-low flags, sampled
// on the rising reference edge, i.e. the value each flag held just before
// it. Both low at once is treated as no request. dco_restart holds the INNER
// DCO and the divider in reset. search_step shows the step of the current
// cycle. rst is asynchronous, active high.
//
// From the design description: the start in the middle band, the n/4 first
// step, halving on every reversal, the end of acquisition at step 1, single
// fine steps afterwards, and updates only every m reference cycles. This
// design's own: the DCO restart for the frequency comparison, the
// proportional kick in phase mode, saturation at
// the code limits, phase-mode steps carried across the fine/coarse boundary
// (the code is one 12-bit number), lock meaning "frequency acquisition
// done", and lock held until reset.
module adpll_controller
  import adpll_pkg::*;
#(
  parameter int unsigned UPDATE_M   = 2,  // reference cycles between code updates (m)
  parameter int unsigned PHASE_KICK = 1   // proportional fine steps in phase mode
) (
  input  logic                ref_clk,
  input  logic                rst,
  input  logic                p_up_n,
  input  logic                p_down_n,
  output logic [COARSE_W-1:0] coarse,
  output logic [FINE_W-1:0]   fine,
  output logic                lock,
  output logic                dco_restart,
  output logic [CODE_W-1:0]   search_step
);

  localparam logic [CODE_W-1:0] CODE_MAX  = '1;
  localparam logic [CODE_W-1:0] STEP_INIT = CODE_W'(1) << (CODE_W - 2);  // n/4
  localparam int unsigned       CNT_W     = (UPDATE_M > 1) ? $clog2(UPDATE_M) : 1;

  dco_code_t         code_q;   // integrated code
  dco_code_t         out_q;    // code driven to the DCO
  logic [CODE_W-1:0] step_q;
  ctrl_mode_e        mode_q;
  pfd_dir_e          last_dir_q;
  logic [CNT_W-1:0]  cnt_q;
  logic              restart_q;

  pfd_dir_e          dir;
  logic              update;
  logic [CODE_W-1:0] step_eff;
  logic [CODE_W:0]   sum;
  logic [CODE_W-1:0] code_next;
  logic [CODE_W-1:0] out_next;
  logic [CODE_W+1:0] kicked;

  assign update = (cnt_q == CNT_W'(UPDATE_M - 1));

  // Acquisition: the restarted feedback edge either came before the
  // reference edge (DOWN flag low) or not. Phase mode: the detector's flags.
  always_comb begin
    if (mode_q == MODE_FREQ)      dir = !p_down_n ? DIR_DOWN : DIR_UP;
    else if (!p_up_n && p_down_n) dir = DIR_UP;
    else if (p_up_n && !p_down_n) dir = DIR_DOWN;
    else                          dir = DIR_NONE;
  end

  // Step used at this update: halved on a reversal during acquisition,
  // always one in phase mode.
  always_comb begin
    if (mode_q == MODE_PHASE)
      step_eff = CODE_W'(1);
    else if (last_dir_q != DIR_NONE && dir != DIR_NONE && dir != last_dir_q)
      step_eff = step_q >> 1;
    else
      step_eff = step_q;
  end

  always_comb begin
    code_next = code_q;
    sum       = '0;
    if (dir == DIR_UP) begin
      sum       = {1'b0, code_q} + {1'b0, step_eff};
      code_next = sum[CODE_W] ? CODE_MAX : sum[CODE_W-1:0];
    end else if (dir == DIR_DOWN) begin
      code_next = (code_q > step_eff) ? code_q - step_eff : '0;
    end
  end

  // DCO code: the integrated code, plus or minus the kick in phase mode.
  always_comb begin
    kicked = {2'b00, code_next};
    if (mode_q == MODE_PHASE && dir == DIR_UP)
      kicked = {2'b00, code_next} + (CODE_W+2)'(PHASE_KICK);
    else if (mode_q == MODE_PHASE && dir == DIR_DOWN)
      kicked = {2'b00, code_next} - (CODE_W+2)'(PHASE_KICK);
    if (kicked[CODE_W+1])     out_next = '0;        // below zero
    else if (kicked[CODE_W])  out_next = CODE_MAX;  // above the top
    else                      out_next = kicked[CODE_W-1:0];
  end

  always_ff @(posedge ref_clk or posedge rst) begin
    if (rst) begin
      code_q     <= CODE_START;
      out_q      <= CODE_START;
      step_q     <= STEP_INIT;
      mode_q     <= MODE_FREQ;
      last_dir_q <= DIR_NONE;
      cnt_q      <= '0;
      restart_q  <= 1'b1;
    end else begin
      cnt_q <= update ? '0 : cnt_q + CNT_W'(1);
      // Restart at an acquisition update that does not end acquisition,
      // release on the edge before the next update.
      if (update)
        restart_q <= (mode_q == MODE_FREQ) && (step_eff > CODE_W'(1)) && (UPDATE_M > 1);
      else if (cnt_q == CNT_W'(UPDATE_M - 2))
        restart_q <= 1'b0;
      if (update) out_q <= out_next;
      if (update && dir != DIR_NONE) begin
        code_q     <= code_next;
        last_dir_q <= dir;
        if (mode_q == MODE_FREQ) begin
          step_q <= step_eff;
          if (step_eff <= CODE_W'(1)) mode_q <= MODE_PHASE;
        end
      end
    end
  end

  assign coarse      = out_q.coarse;
  assign fine        = out_q.fine;
  assign lock        = (mode_q == MODE_PHASE);
  assign dco_restart = restart_q;
  assign search_step = step_eff;

  // The step never reaches zero, and the DCO is never held in restart
  // across an update.
  a_step_nonzero: assert property (@(posedge ref_clk) disable iff (rst) step_q != '0);
  a_restart_released: assert property (@(posedge ref_clk) disable iff (rst)
    (update && UPDATE_M > 1) |-> !restart_q);

endmodule
