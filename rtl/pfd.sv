`timescale 1ps / 1fs
// pfd: phase/frequency detector of the ADPLL (behavioural model).
//
// Behavioural model of a gate-level cell: its flip-flops and gates are library
// cells whose timing the model represents with assignment delays. It is not
// meant for synthesis.
//
// Two set-only flip-flops, QU clocked by the reference (in_clk, IN_CLK) and
// QD by the divided DCO clock (fb_clk, FB_CLK), record which edge came first.
// When both are set, or while rst is high, both are cleared after T_RST_PS.
// The error signal outu_n is low while QU is set and QD is not (feedback
// late), outd_n while QD is set and QU is not (feedback early); both gates
// have a delay of T_DEAD_PS and, being inertial, swallow shorter pulses, so a
// phase error below that width produces no request (the +-50 ps dead zone).
// Each error signal is widened by a pulse_amp and clears an output
// flip-flop: flag_u_n is cleared by the widened up pulse and set again by the
// next in_clk edge; flag_d_n is cleared by the widened down pulse and set
// again by the next fb_clk edge. A flag therefore stays low from the error
// until the next edge of its clock. The output flip-flops have no reset of
// their own: rst clears QU and QD, which keeps both error signals idle, so
// each flag returns high at the first edge of its clock.
//
// Interface: flag_u_n (flagU, P_UP) is low when the feedback clock lagged the
// reference and the DCO should speed up; flag_d_n (flagD, P_DOWN) is low when
// it led and the DCO should slow down. Both are active low and idle high.
// Setting a flag takes T_CQ_PS after its clock edge, so logic clocked by the
// same reference edge samples the value the flag held before that edge.
//
// The flip-flop arrangement, the pulse amplifiers, the signal names and the
// +-50 ps dead zone follow the design description; the delay values, the
// active-low reading of the error signals and the reset of the output flags
// are this model's assumptions.
module pfd #(
  parameter real T_RST_PS  = 100.0,
  parameter real T_DEAD_PS = 50.0,
  parameter real T_CQ_PS   = 100.0
) (
  input  logic in_clk,
  input  logic fb_clk,
  input  logic rst,
  output logic flag_u_n,
  output logic flag_d_n
);

  logic qu, qd, clr;
  logic outu_n, outd_n;
  logic bu_n, bd_n;

  initial begin
    qu       = 1'b0;
    qd       = 1'b0;
    flag_u_n = 1'b1;
    flag_d_n = 1'b1;
  end

  assign #(T_RST_PS) clr = (qu & qd) | rst;

  always @(posedge in_clk or posedge clr) begin
    if (clr) qu <= 1'b0;
    else     qu <= 1'b1;
  end

  always @(posedge fb_clk or posedge clr) begin
    if (clr) qd <= 1'b0;
    else     qd <= 1'b1;
  end

  assign #(T_DEAD_PS) outu_n = ~(qu & ~qd);
  assign #(T_DEAD_PS) outd_n = ~(qd & ~qu);

  pulse_amp u_amp_u (.pulse_in(outu_n), .pulse_out(bu_n));
  pulse_amp u_amp_d (.pulse_in(outd_n), .pulse_out(bd_n));

  always @(posedge in_clk or negedge bu_n) begin
    if (!bu_n) flag_u_n <= 1'b0;
    else       flag_u_n <= #(T_CQ_PS) 1'b1;
  end

  always @(posedge fb_clk or negedge bd_n) begin
    if (!bd_n) flag_d_n <= 1'b0;
    else       flag_d_n <= #(T_CQ_PS) 1'b1;
  end

endmodule
