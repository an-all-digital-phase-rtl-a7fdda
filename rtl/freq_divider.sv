`timescale 1ps / 1fs
// freq_divider: divides the INNER DCO clock by M to feed the phase detector.
//
// A down-counter reloads with M-1 every M DCO cycles; the output is high for
// the first floor(M/2) cycles of each period and low for the rest, so it has
// exactly one rising edge every M input cycles (the only edge the phase
// detector uses) and a duty cycle as close to 50 % as an integer count allows.
//
// Interface: clk is the DCO clock, div_m the 8-bit ratio M[7:0], clk_div the
// divided clock (dco_out_divM), registered, so free of glitches. rst is
// asynchronous and active high; the counter restarts at the beginning of a
// period. A new ratio takes effect at the next period boundary.
//
// The 8-bit ratio and the divider's place in the loop follow the design
// description, which gives only its function; the counter structure, the
// duty cycle and treating M = 0 and M = 1 like M = 2 are this design's own.
module freq_divider #(
  parameter int unsigned M_W = 8
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [M_W-1:0] div_m,
  output logic           clk_div
);

  logic [M_W-1:0] m_eff;
  logic [M_W-1:0] cnt_q;   // position inside the current period, 0 .. m_q-1
  logic [M_W-1:0] m_q;     // ratio latched at the start of the period

  assign m_eff = (div_m < M_W'(2)) ? M_W'(2) : div_m;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      cnt_q   <= '0;
      m_q     <= M_W'(1);  // makes the first clock start a period
      clk_div <= 1'b0;
    end else if (cnt_q >= m_q - M_W'(1)) begin
      // Start of a period: rising edge of the divided clock.
      cnt_q   <= '0;
      m_q     <= m_eff;
      clk_div <= 1'b1;
    end else begin
      cnt_q   <= cnt_q + M_W'(1);
      clk_div <= (cnt_q + M_W'(1)) < (m_q >> 1);
    end
  end

endmodule
