`timescale 1ps / 1fs
// pulse_amp: digital pulse amplifier of the phase detector (behavioural model).
//
// Behavioural model of a gate-level cell: the real part is built from library
// cells and its timing comes from their delays, which the model represents
// with assignment delays. It is not meant for synthesis.
//
// The amplifier widens the short, active-low error pulses of the phase
// detector so that the following flip-flop can be cleared by them. The input
// goes through a buffer, then through a cascade of N_STAGES two-input AND
// stages: stage k combines the output of stage k-1 with the signal one step
// further back (the input of stage k-1). A low pulse reaches each stage
// through two paths of different delay, and the stage output stays low for
// the union of the two, so the pulse grows by one gate delay every second
// stage: 180 ps in all with the default six stages and 60 ps gates.
//
// Gate delays are inertial, so a pulse narrower than one stage delay dies in
// the first stage: that is the residual dead zone of the detector.
//
// Interface: pulse_in (PULSE_IN) and pulse_out (PULSE_OUT), both active low,
// high when idle.
//
// The AND cascade and the stage wiring follow the design's amplifier diagram
// (six stages are drawn); the delay values are this model's assumptions.
module pulse_amp #(
  parameter int unsigned N_STAGES = 6,
  parameter real         T_BUF_PS = 60.0,
  parameter real         T_AND_PS = 60.0
) (
  input  logic pulse_in,
  output logic pulse_out
);

  // s[0] = input, s[1] = buffered input, s[k+1] = stage k output.
  logic [N_STAGES+1:0] s;

  assign s[0] = pulse_in;
  assign #(T_BUF_PS) s[1] = s[0];

  for (genvar k = 1; k <= N_STAGES; k++) begin : g_stage
    assign #(T_AND_PS) s[k+1] = s[k] & s[k-1];
  end

  assign pulse_out = s[N_STAGES+1];

endmodule
