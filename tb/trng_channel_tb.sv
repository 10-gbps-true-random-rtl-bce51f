// trng_channel_tb: end-to-end check of one channel with 256 oscillators.
//
// The reference model reads the 256 sampling flip-flops after every clock
// edge, computes their parity itself, and predicts td: that parity 9
// clocks later with bypass set, or its XOR with the parity one clock
// older with bypass clear. Three phases: oscillators stopped (td must be
// 0, the parity of 256 resting ones), raw output, and FIR11 output. In
// the running phases the share of ones must lie between 35% and 65%, and
// the raw bits must change, showing that the oscillators do run. The
// first 12 clocks after each settings change are not checked.
module trng_channel_tb;
  timeunit 1ps; timeprecision 1ps;

  localparam int N = 256;
  localparam int LAT = 9;
  localparam int SETTLE = 12;
  localparam int RUN = 600;
  localparam int MAXC = 40 + 2 * RUN + 10;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic osc_en;
  logic bypass;
  logic td;

  trng_channel dut (.clk(clk), .osc_en(osc_en), .bypass(bypass), .td(td));

  always #500 clk = ~clk;

  bit p [MAXC];
  int cyc = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: cycle %0d: %s", cyc, what);
    end
  endtask

  // Runs n clocks with fixed settings and checks td on every clock after
  // the settling time. Returns the number of ones and of raw-bit changes.
  task automatic run_phase(input int n, input bit en, input bit byp,
                           output int ones, output int changes);
    bit e;
    osc_en = en;
    bypass = byp;
    ones = 0;
    changes = 0;
    for (int k = 0; k < n; k++) begin
      @(posedge clk);
      #100;
      p[cyc] = ^dut.u_tree.node[2*N-1:N];
      if (k >= SETTLE) begin
        e = byp ? p[cyc - LAT] : (p[cyc - LAT] ^ p[cyc - LAT - 1]);
        check(td == e, $sformatf("td=%b expected %b (en=%b bypass=%b)", td, e, en, byp));
        if (!en) check(td == 1'b0, "stopped channel outputs 0");
        if (td) ones++;
        if (p[cyc] != p[cyc - 1]) changes++;
      end
      cyc++;
    end
  endtask

  initial begin
    int ones, changes, m;
    run_phase(40, 1'b0, 1'b1, ones, changes);
    check(changes == 0, "no raw activity while stopped");

    run_phase(RUN, 1'b1, 1'b1, ones, changes);
    m = RUN - SETTLE;
    $display("raw: %0d ones of %0d, %0d changes", ones, m, changes);
    check(ones > m * 35 / 100 && ones < m * 65 / 100, "raw ones share 35..65%");
    check(changes > m / 4, "raw bits change");

    run_phase(RUN, 1'b1, 1'b0, ones, changes);
    $display("FIR11: %0d ones of %0d", ones, m);
    check(ones > m * 35 / 100 && ones < m * 65 / 100, "FIR11 ones share 35..65%");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #((MAXC + 50) * 1000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
