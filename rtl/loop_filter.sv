`timescale 1ps / 1fs
// loop_filter: smooths the INNER DCO code before it reaches the OUTPUT DCO.
//
// Once locked, the controller's code keeps dithering by a few fine steps
// because of the phase detector's dead zone, the DCO's finite resolution and
// reference jitter. The filter watches the code once per reference cycle,
// keeps the largest and smallest value seen in a window of K_WIN cycles and,
// at the end of each window, outputs (max + min) / 2 (rounded down) as the
// average code {avg_coarse, avg_fine}. The output then holds for the next
// window, so the OUTPUT DCO sees at most one code change every K_WIN cycles.
//
// Interface: code_coarse / code_fine are the INNER DCO code, sampled on the
// rising ref_clk edge. avg_* are registered and change on the edge that takes
// the last sample of a window; avg_valid is high for the cycle after it. rst is
// asynchronous, active high, and sets the output to the search start code.
//
// The max/min midpoint over k reference cycles follows the design
// description. The window length K_WIN is not given there: 16 cycles is this
// design's choice, as are the reset value and the rounding.
module loop_filter
  import adpll_pkg::*;
#(
  parameter int unsigned K_WIN = 16  // window length k, reference cycles
) (
  input  logic                ref_clk,
  input  logic                rst,
  input  logic [COARSE_W-1:0] code_coarse,
  input  logic [FINE_W-1:0]   code_fine,
  output logic [COARSE_W-1:0] avg_coarse,
  output logic [FINE_W-1:0]   avg_fine,
  output logic                avg_valid
);

  localparam int unsigned CNT_W = (K_WIN > 1) ? $clog2(K_WIN) : 1;

  logic [CODE_W-1:0] code_in;
  logic [CODE_W-1:0] max_q, min_q, max_n, min_n;
  logic [CODE_W:0]   mid_sum;
  logic [CNT_W-1:0]  cnt_q;
  logic              last;
  dco_code_t         avg_q;

  assign code_in = {code_coarse, code_fine};
  assign last    = (cnt_q == CNT_W'(K_WIN - 1));

  // Extremes including the current sample; the first sample of a window
  // replaces the previous window's extremes.
  always_comb begin
    if (cnt_q == '0) begin
      max_n = code_in;
      min_n = code_in;
    end else begin
      max_n = (code_in > max_q) ? code_in : max_q;
      min_n = (code_in < min_q) ? code_in : min_q;
    end
    mid_sum = {1'b0, max_n} + {1'b0, min_n};
  end

  always_ff @(posedge ref_clk or posedge rst) begin
    if (rst) begin
      cnt_q     <= '0;
      max_q     <= '0;
      min_q     <= '0;
      avg_q     <= CODE_START;
      avg_valid <= 1'b0;
    end else begin
      cnt_q     <= last ? '0 : cnt_q + CNT_W'(1);
      max_q     <= max_n;
      min_q     <= min_n;
      avg_valid <= last;
      if (last) avg_q <= mid_sum[CODE_W:1];
    end
  end

  assign avg_coarse = avg_q.coarse;
  assign avg_fine   = avg_q.fine;

  a_mid_in_range: assert property (@(posedge ref_clk) disable iff (rst)
    last |-> (mid_sum[CODE_W:1] >= min_n && mid_sum[CODE_W:1] <= max_n));

endmodule
