`timescale 1ps / 1fs
// adpll: all-digital phase-locked loop for clock generation (top level).
//
// The loop multiplies the reference clock by M using two identical
// cell-based DCOs:
//   * The INNER DCO sits in the loop. Its clock is divided by M
//     (freq_divider) and compared with the reference in the phase/frequency
//     detector (pfd). The controller (adpll_controller), clocked by the
//     reference, turns the detector's up/down flags into the 12-bit code
//     {coarse, fine}: first a search with a step that halves on every
//     reversal (frequency acquisition, at most 42 reference cycles with the
//     default m = 2), then single fine steps that keep the phase aligned,
//     with a one-step proportional kick that keeps that loop stable.
//   * The OUTPUT DCO makes the clock that leaves the block. It runs from the
//     loop filter's code, the midpoint of the largest and smallest INNER code
//     seen in each window of K_WIN reference cycles, so the dithering of the
//     locked loop does not reach out_clk.
//
// Interface: ref_clk (REF_CLK), rst (RESET, asynchronous, active high),
// div_m (M[7:0]), out_clk (OUT_CLK), lock (LOCK, high once frequency
// acquisition is over). The remaining outputs expose the internal signals of
// the loop for observation: the INNER code, the filtered code and its
// update strobe, the divided clock (dco_out_divM), the detector flags (P_UP,
// P_DOWN, active low) and the controller's current search step.
//
// During frequency acquisition the controller restarts the INNER DCO and the
// divider before every comparison (see adpll_controller), so each decision
// compares M DCO periods with one reference period; this restart is a choice
// of this design.
//
// The partition, the two DCOs and all connections follow the design's block
// diagram. The DCOs and the detector are behavioural models of cell-level
// circuits; the controller, divider, loop filter and coarse encoder are
// synthesizable logic.
module adpll
  import adpll_pkg::*;
#(
  parameter int unsigned UPDATE_M   = 2,   // reference cycles per code update (m)
  parameter int unsigned PHASE_KICK = 1,   // proportional fine steps when locked
  parameter int unsigned K_WIN      = 16   // loop filter window (k)
) (
  input  logic                ref_clk,
  input  logic                rst,
  input  logic [7:0]          div_m,
  output logic                out_clk,
  output logic                lock,
  output logic [COARSE_W-1:0] coarse,
  output logic [FINE_W-1:0]   fine,
  output logic [COARSE_W-1:0] avg_coarse,
  output logic [FINE_W-1:0]   avg_fine,
  output logic                dco_out_divm,
  output logic                p_up_n,
  output logic                p_down_n,
  output logic [CODE_W-1:0]   search_step,
  output logic                avg_valid
);

  logic inner_clk;
  logic dco_restart;
  logic inner_rst;

  pfd u_pfd (
    .in_clk   (ref_clk),
    .fb_clk   (dco_out_divm),
    .rst      (rst),
    .flag_u_n (p_up_n),
    .flag_d_n (p_down_n)
  );

  adpll_controller #(.UPDATE_M(UPDATE_M), .PHASE_KICK(PHASE_KICK)) u_ctrl (
    .ref_clk     (ref_clk),
    .rst         (rst),
    .p_up_n      (p_up_n),
    .p_down_n    (p_down_n),
    .coarse      (coarse),
    .fine        (fine),
    .lock        (lock),
    .dco_restart (dco_restart),
    .search_step (search_step)
  );

  // The INNER DCO and the divider restart together during acquisition.
  assign inner_rst = rst | dco_restart;

  dco u_inner_dco (
    .rst     (inner_rst),
    .coarse  (coarse),
    .fine    (fine),
    .clk_out (inner_clk)
  );

  freq_divider #(.M_W(8)) u_div (
    .clk     (inner_clk),
    .rst     (inner_rst),
    .div_m   (div_m),
    .clk_div (dco_out_divm)
  );

  loop_filter #(.K_WIN(K_WIN)) u_lf (
    .ref_clk     (ref_clk),
    .rst         (rst),
    .code_coarse (coarse),
    .code_fine   (fine),
    .avg_coarse  (avg_coarse),
    .avg_fine    (avg_fine),
    .avg_valid   (avg_valid)
  );

  dco u_output_dco (
    .rst     (rst),
    .coarse  (avg_coarse),
    .fine    (avg_fine),
    .clk_out (out_clk)
  );

endmodule
