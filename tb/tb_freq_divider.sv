`timescale 1ps / 1fs
// tb_freq_divider: self-checking test of the divide-by-M counter.
//
// For a set of ratios (the 0 and 1 corner cases, which divide by two, small
// odd and even values, the 40 used at 200 MHz and the top of the 8-bit
// range) it counts input cycles between rising edges of the divided clock
// and the cycles for which it is high, and compares them with M (at least 2)
// and floor(M/2). It also checks that the output stays low during reset.
module tb_freq_divider;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [7:0] div_m = 8'd40;
  logic clk_div;

  int checks   = 0;
  int failures = 0;
  int cyc      = 0;
  int high     = 0;

  freq_divider dut (.clk, .rst, .div_m, .clk_div);

  always #1000 clk = ~clk;
  always @(posedge clk) cyc++;
  always @(negedge clk) if (clk_div) high++;

  task automatic measure(int m);
    int me, c0, h0;
    me = (m < 2) ? 2 : m;
    div_m = 8'(m);
    repeat (2) @(posedge clk_div);
    for (int rep = 0; rep < 3; rep++) begin
      @(posedge clk_div);
      c0 = cyc;
      h0 = high;
      @(posedge clk_div);
      checks++;
      if (cyc - c0 != me || high - h0 != me / 2) begin
        failures++;
        $display("FAIL M=%0d: period %0d high %0d", m, cyc - c0, high - h0);
      end
    end
  endtask

  initial begin
    int ms[$];
    repeat (3) @(posedge clk);
    checks++;
    if (clk_div !== 1'b0) failures++;
    @(negedge clk);
    rst = 1'b0;
    ms = '{40, 2, 3, 0, 1, 5, 255, 128, 17, 4};
    foreach (ms[i]) measure(ms[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd50_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
