`timescale 1ps / 1fs
// dco_coarse_encoder: path-select decoder of the DCO's coarse-tuning stage.
//
// The coarse stage is a chain of 64 delay taps split into 4 groups of 16.
// Inside a group, 16 tristate buffers pick one tap (first-stage selector,
// enables en[63:0]); a second stage of 4 tristate buffers picks one group's
// partial output (enables sep[3:0]). Splitting the selector keeps the load on
// any one output node small.
//
// The encoder turns the 6-bit coarse code c into one-hot enables:
//   en[c]        the tap c, which passes 63 - c coarse delay cells, so a
//                larger code gives a shorter ring and a higher frequency;
//   sep[c[5:4]]  the group holding that tap; group P0 (taps 63..48) is
//                enabled by sep[3], group P3 (taps 15..0) by sep[0].
// Purely combinational.
//
// The 64-path, 16-per-group, two-stage organisation and the signal names
// EN[63:0] / SEP[3:0] follow the design description; the index order (en
// index = code) is read from its path diagram and the code direction is this
// design's choice, made so that a larger code is faster.
module dco_coarse_encoder
  import adpll_pkg::*;
(
  input  logic [COARSE_W-1:0] coarse,
  output logic [N_PATHS-1:0]  en,
  output logic [N_GROUPS-1:0] sep
);

  localparam int unsigned GRP_W = $clog2(N_GROUPS);

  logic [GRP_W-1:0] group;

  assign group = coarse[COARSE_W-1 -: GRP_W];

  for (genvar i = 0; i < N_PATHS; i++) begin : g_en
    assign en[i] = (coarse == COARSE_W'(i));
  end

  for (genvar g = 0; g < N_GROUPS; g++) begin : g_sep
    assign sep[g] = (group == GRP_W'(g));
  end

endmodule
