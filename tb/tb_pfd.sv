`timescale 1ps / 1fs
// tb_pfd: self-checking test of the phase/frequency detector model.
//
// Runs a 5 MHz reference (200 ns) against a feedback clock of the same
// period shifted by a chosen phase, and samples the two active-low flags on
// every reference edge, as the controller does. Expected: a late feedback
// clock asks for UP (flag_u_n low, flag_d_n high), an early one for DOWN,
// and a phase error inside the +-50 ps dead zone asks for nothing. It then
// runs the feedback clock 5 % slow and 5 % fast and expects a clear
// majority of UP or DOWN requests respectively (frequency detection), and
// checks that rst holds both flags idle.
module tb_pfd;

  localparam real T_REF = 200_000.0;

  logic in_clk = 1'b0;
  logic fb_clk = 1'b0;
  logic rst    = 1'b1;
  logic flag_u_n, flag_d_n;

  int checks   = 0;
  int failures = 0;
  real fb_period = T_REF;
  bit  run       = 1'b0;
  int  epoch     = 0;
  int  n_up = 0, n_dn = 0, n_none = 0;

  pfd dut (.in_clk, .fb_clk, .rst, .flag_u_n, .flag_d_n);

  always begin
    #(T_REF / 2.0) in_clk = ~in_clk;
  end

  always @(posedge in_clk) begin
    if (run) begin
      if (!flag_u_n && flag_d_n)      n_up++;
      else if (flag_u_n && !flag_d_n) n_dn++;
      else                            n_none++;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Restart the feedback clock, first edge shift after the next reference
  // edge, with the given period; skip three
  // cycles, then count flags over n cycles.
  task automatic observe(real shift, real period, int n);
    int my_epoch;
    fb_period = period;
    @(posedge in_clk);
    epoch++;
    my_epoch = epoch;
    fb_clk = 1'b0;
    // Clear the flip-flops so the first feedback edge meets an idle detector.
    rst = 1'b1;
    #1000;
    rst = 1'b0;
    fork
      begin
        #(T_REF - 1000.0 + shift);
        while (my_epoch == epoch) begin
          fb_clk = 1'b1;
          #(fb_period / 2.0);
          fb_clk = 1'b0;
          #(fb_period / 2.0);
        end
      end
    join_none
    repeat (3) @(posedge in_clk);
    #1;
    n_up = 0; n_dn = 0; n_none = 0;
    run = 1'b1;
    repeat (n) @(posedge in_clk);
    #1;
    run = 1'b0;
  endtask

  initial begin
    real shifts[$];
    #1_000_000;
    check(flag_u_n && flag_d_n, "flags idle in reset");
    rst = 1'b0;
    shifts = '{2000.0, -2000.0, 500.0, -500.0, 60.0, -60.0, 30.0, -30.0, 40.0, -40.0, 0.0,
               50_000.0, -50_000.0};
    foreach (shifts[i]) begin
      observe(shifts[i], T_REF, 8);
      if (shifts[i] > 50.0)
        check(n_up == 8 && n_dn == 0, $sformatf("late %0.0f ps: up %0d down %0d", shifts[i], n_up, n_dn));
      else if (shifts[i] < -50.0)
        check(n_dn == 8 && n_up == 0, $sformatf("early %0.0f ps: up %0d down %0d", -shifts[i], n_up, n_dn));
      else
        check(n_none == 8, $sformatf("dead zone %0.0f ps: up %0d down %0d", shifts[i], n_up, n_dn));
    end
    observe(1000.0, T_REF * 1.05, 30);
    check(n_up > 3 * n_dn, $sformatf("slow feedback: up %0d down %0d", n_up, n_dn));
    observe(1000.0, T_REF * 0.95, 30);
    check(n_dn > 3 * n_up, $sformatf("fast feedback: up %0d down %0d", n_up, n_dn));
    rst = 1'b1;
    repeat (3) @(posedge in_clk);
    #1000;
    check(flag_u_n && flag_d_n, "flags idle in second reset");
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
