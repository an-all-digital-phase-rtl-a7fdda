`timescale 1ps / 1fs
// dco: cell-based digitally controlled oscillator (behavioural model).
//
// Behavioural model of a ring oscillator built from library cells; its
// frequency comes from cell delays, so it cannot be synthesised as logic. The
// coarse path-select decoder inside it is real logic (dco_coarse_encoder).
//
// The ring is a coarse-tuning stage followed by a fine-tuning delay cell:
//   * Coarse stage: a chain of 64 delay taps in 4 groups of 16. The encoder
//     turns the 6-bit coarse code into one-hot tap enables en[63:0] and group
//     enables sep[3:0]; tap c passes 63 - c coarse cells, each adding
//     T_COARSE_PS to the period (the cell's rise plus fall delay).
//   * Fine stage: one fine-tuning cell whose 64 settings cover one coarse
//     step; the model takes its delay as linear in the fine code, T_FINE_PS
//     per step, 63 - fine steps in all.
// Period = T_MIN_PS + (63 - tap) * T_COARSE_PS + (63 - fine) * T_FINE_PS,
// so a larger code {coarse, fine} gives a higher frequency. With the default
// values the range is 1.833 ns (545 MHz) down to 24.23 ns (41.3 MHz) in
// 5.47 ps steps.
//
// Interface: while rst is high the ring is broken and clk_out stays low;
// T_START_PS after rst falls the output rises and the ring runs, so the
// phase of the clock is set by the release of rst (the loop uses this to
// restart the INNER DCO in step with the reference). The code is read at every output
// edge, so a new code takes effect within half a period. If the decoded
// enables do not select exactly one tap in the enabled group the ring has no
// path and the output stops.
//
// From the design description: the 64-tap, 16-per-group, two-stage coarse
// selector, the period range 1.833 ns to 24.261 ns (545 to 41 MHz), a
// fine-tuning cell covering one coarse step at about 5 ps resolution. This
// model's own: the start-up behaviour, linear fine steps (the real cell is mapped through a lookup
// table from transistor-level simulation), T_FINE_PS = T_COARSE_PS / 64, and
// a coarse step of 350 ps, chosen so that 64 x 64 codes span that period
// range; the description's round figure for the cell is about 300 ps, which
// would stop the range at about 47 MHz.
//
// The ring oscillator is a combinational loop by nature: synthesis tools
// report the model's clk_out feedback as a logic loop, which is expected.
module dco
  import adpll_pkg::*;
#(
  parameter real T_MIN_PS    = 1833.0,
  parameter real T_COARSE_PS = 350.0,
  parameter real T_FINE_PS   = 350.0 / 64.0,
  parameter real T_START_PS  = 20.0
) (
  input  logic                rst,
  input  logic [COARSE_W-1:0] coarse,
  input  logic [FINE_W-1:0]   fine,
  output logic                clk_out
);

  logic [N_PATHS-1:0]  en;
  logic [N_GROUPS-1:0] sep;

  dco_coarse_encoder u_enc (.coarse(coarse), .en(en), .sep(sep));

  // Tap that conducts: enabled in the first stage and in an enabled group.
  // Returns -1 when no single path conducts.
  function automatic int selected_tap(logic [N_PATHS-1:0] e, logic [N_GROUPS-1:0] s);
    int tap = -1;
    int n   = 0;
    for (int i = 0; i < int'(N_PATHS); i++) begin
      if (e[i] && s[i / int'(GROUP_PATHS)]) begin
        tap = i;
        n++;
      end
    end
    return (n == 1) ? tap : -1;
  endfunction

  function automatic real half_period(int tap, logic [FINE_W-1:0] f);
    real p;
    p = T_MIN_PS + real'(N_PATHS - 1 - tap) * T_COARSE_PS
      + real'((1 << FINE_W) - 1 - int'(f)) * T_FINE_PS;
    return p / 2.0;
  endfunction

  initial clk_out = 1'b0;

  always begin
    if (rst) begin
      clk_out = 1'b0;
      @(negedge rst);
      // The ring restarts with a rising edge T_START_PS after release.
      #(T_START_PS);
      if (!rst && selected_tap(en, sep) >= 0) clk_out = 1'b1;
    end else if (selected_tap(en, sep) < 0) begin
      @(en or sep or rst);
    end else begin
      #(half_period(selected_tap(en, sep), fine));
      clk_out = rst ? 1'b0 : ~clk_out;
    end
  end

endmodule
