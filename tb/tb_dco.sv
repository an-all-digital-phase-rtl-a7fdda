`timescale 1ps / 1fs
// tb_dco: self-checking test of the DCO behavioural model.
//
// For the fastest and slowest codes, the middle code, the code that gives
// 200 MHz and random codes, it measures the output period between rising
// edges and compares it with 1833 ps + (63 - coarse) * 350 ps
// + (63 - fine) * 350/64 ps, the period the coarse and fine stages should
// add up to, and checks the ends of the range (545 MHz at the top code,
// about 41 MHz at code 0). It also checks that the output stays low and
// still while rst is high.
module tb_dco;
  import adpll_pkg::*;

  logic rst = 1'b1;
  logic [COARSE_W-1:0] coarse = 6'd32;
  logic [FINE_W-1:0]   fine   = 6'd32;
  logic clk_out;

  int checks   = 0;
  int failures = 0;
  int edges    = 0;
  real per     = 0.0;

  dco dut (.rst, .coarse, .fine, .clk_out);

  always @(posedge clk_out) edges++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic measure(int c, int f);
    realtime t0, t1;
    real expected, got;
    coarse = 6'(c);
    fine   = 6'(f);
    repeat (3) @(posedge clk_out);
    t0 = $realtime;
    @(posedge clk_out);
    t1 = $realtime;
    got      = t1 - t0;
    per      = got;
    expected = 1833.0 + (63 - c) * 350.0 + (63 - f) * 5.46875;
    check(got > expected - 0.01 && got < expected + 0.01,
          $sformatf("code {%0d,%0d}: period %f ps expected %f ps", c, f, got, expected));
  endtask

  initial begin
    #50_000;
    check(clk_out == 1'b0 && edges == 0, "output moved during reset");
    rst = 1'b0;
    measure(63, 63);
    check(1.0e6 / per > 544.0 && 1.0e6 / per < 546.0, "top of range not 545 MHz");
    measure(0, 0);
    check(1.0e6 / per > 41.0 && 1.0e6 / per < 41.5, "bottom of range not 41 MHz");
    measure(32, 32);
    measure(54, 60);
    measure(54, 61);
    for (int i = 0; i < 30; i++) measure($urandom_range(0, 63), $urandom_range(0, 63));
    rst = 1'b1;
    #100;
    edges = 0;
    #50_000;
    check(clk_out == 1'b0 && edges == 0, "output moved during second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd20_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
