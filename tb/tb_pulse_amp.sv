`timescale 1ps / 1fs
// tb_pulse_amp: self-checking test of the digital pulse amplifier model.
//
// Sends active-low pulses of several widths through the amplifier and
// measures when the output falls and rises. The expected edges come from
// following the low interval through the cascade: the buffer delays it by
// T_BUF, and each stage takes the union of its two inputs' low intervals and
// delays it by T_AND. A pulse narrower than one gate delay must not come out
// at all (inertial gates).
module tb_pulse_amp;

  localparam real TB  = 60.0;
  localparam real TA  = 60.0;
  localparam int  NST = 6;

  logic pulse_in = 1'b1;
  logic pulse_out;

  int checks   = 0;
  int failures = 0;
  realtime t_fall, t_rise;
  int n_fall = 0;

  pulse_amp dut (.pulse_in, .pulse_out);

  always @(negedge pulse_out) begin t_fall = $realtime; n_fall++; end
  always @(posedge pulse_out) t_rise = $realtime;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic send(real w);
    real lo[NST+2], hi[NST+2];
    realtime t0;
    int n0;
    bit passes;
    lo[0] = 0.0;  hi[0] = w;
    lo[1] = TB;   hi[1] = TB + w;
    for (int k = 1; k <= NST; k++) begin
      lo[k+1] = ((lo[k] < lo[k-1]) ? lo[k] : lo[k-1]) + TA;
      hi[k+1] = ((hi[k] > hi[k-1]) ? hi[k] : hi[k-1]) + TA;
    end
    passes = (w >= TB) && (w >= TA);
    n0 = n_fall;
    #1000;
    t0 = $realtime;
    pulse_in = 1'b0;
    #(w);
    pulse_in = 1'b1;
    #2000;
    if (passes) begin
      check(n_fall == n0 + 1, $sformatf("w=%0.1f: %0d output pulses", w, n_fall - n0));
      check((t_fall - t0) > lo[NST+1] - 0.01 && (t_fall - t0) < lo[NST+1] + 0.01,
            $sformatf("w=%0.1f: fall at %0.2f expected %0.2f", w, t_fall - t0, lo[NST+1]));
      check((t_rise - t0) > hi[NST+1] - 0.01 && (t_rise - t0) < hi[NST+1] + 0.01,
            $sformatf("w=%0.1f: rise at %0.2f expected %0.2f", w, t_rise - t0, hi[NST+1]));
    end else begin
      check(n_fall == n0 && pulse_out == 1'b1, $sformatf("w=%0.1f: narrow pulse came out", w));
    end
  endtask

  initial begin
    #1000;
    check(pulse_out == 1'b1, "idle output");
    send(200.0);
    send(60.0);
    send(75.5);
    send(1000.0);
    send(30.0);
    send(10.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
