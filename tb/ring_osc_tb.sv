// ring_osc_tb: checks the ring oscillator model.
//
// It holds the oscillator disabled and checks that q rests at 1 without
// toggling, enables it for 20 ns and measures every period (the mean must
// lie between 4.4 and 5.0 GHz, and the periods must differ, showing
// jitter), then disables it again and checks that it stops at 1 within
// two stage delays. A watchdog ends the run if it hangs.
module ring_osc_tb;
  timeunit 1ps; timeprecision 1ps;

  int checks = 0;
  int failures = 0;

  logic en;
  logic q;

  ring_osc dut (.en(en), .q(q));

  int      rises = 0;
  longint  last_rise = -1;
  longint  per_min = 1 << 30;
  longint  per_max = 0;
  longint  first_rise = -1;

  always @(posedge q) begin
    if (last_rise >= 0) begin
      longint p;
      p = longint'($time) - last_rise;
      if (p < per_min) per_min = p;
      if (p > per_max) per_max = p;
    end else begin
      first_rise = longint'($time);
    end
    last_rise = longint'($time);
    rises++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    en = 1'b0;
    #100;
    // Ignore the settling of the initial state at time 0.
    rises = 0;
    #2000;
    check(q == 1'b1, "q rests at 1 while disabled");
    check(rises == 0, "no edges while disabled");
    rises = 0;
    last_rise = -1;
    en = 1'b1;
    #20000;
    begin
      real f_ghz;
      f_ghz = (rises > 1) ? 1000.0 * real'(rises - 1) / real'(last_rise - first_rise) : 0.0;
      $display("mean frequency %0.3f GHz, period %0d..%0d ps", f_ghz, per_min, per_max);
      check(f_ghz > 4.4 && f_ghz < 5.0, "frequency near 4.7 GHz");
      check(per_max > per_min, "period jitter present");
      check(per_max - per_min < 30, "jitter bounded");
    end
    en = 1'b0;
    #200;
    check(q == 1'b1, "q back at 1 after disable");
    rises = 0;
    #3000;
    check(rises == 0, "stays stopped");
    check(q == 1'b1, "still at 1");
    // Restart once more.
    en = 1'b1;
    #1000;
    check(rises >= 4, "restarts on enable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
