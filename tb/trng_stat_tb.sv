// trng_stat_tb: statistical workload for one full-size channel.
//
// A channel of 256 ring oscillators is sampled at 1 GHz and NBITS output
// bits are collected, first with the post-processing bypassed (raw data)
// and then with FIR11. Three statistics of the NIST SP 800-22 suite are
// computed on each sequence, each against its 0.1% significance threshold
// (NIST uses 1%; the stricter level keeps a single short run from failing
// by chance one time in a hundred per statistic):
//   monobit:          S = |sum(2x-1)| / sqrt(n) must be below 3.291;
//   block frequency:  chi2 = 4M sum((pi_i - 1/2)^2) over blocks of M = 128
//                     bits must be below the 99.9% point of chi-square
//                     with n/M degrees of freedom, taken as
//                     df + 3.090 sqrt(2 df) (normal approximation);
//   runs:             the number of runs V must satisfy
//                     |V - 2n pi(1-pi)| / (2 sqrt(2n) pi(1-pi)) < 3.291,
//                     with pi the share of ones (and the frequency
//                     pre-test |pi - 1/2| < 2/sqrt(n) must hold).
// The published tests use 1000 sequences of 1 Mbit each; a simulation can
// afford only a short sequence, so this is a smoke test of the sampling
// principle, not a certification.
module trng_stat_tb;
  timeunit 1ps; timeprecision 1ps;

  localparam int NBITS = 8192;
  localparam int M = 128;
  localparam int SKIP = 12;
  localparam longint WATCHDOG_PS = longint'(2 * (NBITS + SKIP) + 100) * 1000;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic osc_en = 1'b1;
  logic bypass = 1'b1;
  logic td;

  trng_channel dut (.clk(clk), .osc_en(osc_en), .bypass(bypass), .td(td));

  always #500 clk = ~clk;

  bit seq [NBITS];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic collect();
    for (int k = 0; k < SKIP; k++) @(posedge clk);
    for (int k = 0; k < NBITS; k++) begin
      @(posedge clk);
      #100;
      seq[k] = td;
    end
  endtask

  task automatic evaluate(input string name);
    int ones, runs, nblk;
    real s_obs, pi, chi2, df, lim, z;
    ones = 0;
    runs = 1;
    for (int k = 0; k < NBITS; k++) begin
      ones += int'(seq[k]);
      if (k > 0 && seq[k] != seq[k-1]) runs++;
    end
    // Monobit.
    s_obs = ((2.0 * ones - NBITS) < 0.0 ? -(2.0 * ones - NBITS) : (2.0 * ones - NBITS)) / $sqrt(real'(NBITS));
    // Block frequency.
    nblk = NBITS / M;
    chi2 = 0.0;
    for (int b = 0; b < nblk; b++) begin
      int c;
      c = 0;
      for (int i = 0; i < M; i++) c += int'(seq[b*M + i]);
      chi2 += (real'(c) / M - 0.5) ** 2;
    end
    chi2 = 4.0 * M * chi2;
    df = real'(nblk);
    lim = df + 3.090 * $sqrt(2.0 * df);
    // Runs.
    pi = real'(ones) / NBITS;
    z = (real'(runs) - 2.0 * NBITS * pi * (1.0 - pi));
    if (z < 0.0) z = -z;
    z = z / (2.0 * $sqrt(2.0 * NBITS) * pi * (1.0 - pi));
    $display("%s: n=%0d ones=%0d S=%0.3f chi2=%0.1f (limit %0.1f) runs=%0d z=%0.3f",
             name, NBITS, ones, s_obs, chi2, lim, runs, z);
    check(s_obs < 3.291, {name, " monobit"});
    check(chi2 < lim, {name, " block frequency"});
    check((pi - 0.5 < 2.0 / $sqrt(real'(NBITS))) && (0.5 - pi < 2.0 / $sqrt(real'(NBITS))),
          {name, " runs pre-test"});
    check(z < 3.291, {name, " runs"});
  endtask

  initial begin
    bypass = 1'b1;
    collect();
    evaluate("raw");
    bypass = 1'b0;
    collect();
    evaluate("FIR11");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(WATCHDOG_PS);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
