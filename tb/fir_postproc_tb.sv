// fir_postproc_tb: checks FIR11 post-processing and its bypass.
//
// Random raw bits are applied one per clock while bypass is switched
// every 50 clocks. One clock after each bit, td must equal that bit when
// bypass is 1, and that bit XOR the bit before it when bypass is 0. Both
// modes must occur.
module fir_postproc_tb;
  timeunit 1ps; timeprecision 1ps;

  localparam int CYCLES = 600;

  int checks = 0;
  int failures = 0;
  int n_bypass = 0;
  int n_fir = 0;

  logic clk = 1'b0;
  logic bypass;
  logic raw;
  logic td;

  fir_postproc dut (.clk(clk), .bypass(bypass), .raw(raw), .td(td));

  always #500 clk = ~clk;

  initial begin
    bit prev, cur, byp, exp_td;
    bypass = 1'b1;
    raw = 1'b0;
    @(posedge clk);
    #100;
    prev = raw;
    for (int n = 0; n < CYCLES; n++) begin
      raw = 1'($urandom);
      bypass = ((n / 50) % 2) == 0;
      cur = raw;
      byp = bypass;
      @(posedge clk);
      #100;
      exp_td = byp ? cur : (cur ^ prev);
      checks++;
      if (td !== exp_td) begin
        failures++;
        $display("FAIL: cycle %0d bypass=%b raw=%b prev=%b td=%b", n, byp, cur, prev, td);
      end
      if (byp) n_bypass++; else n_fir++;
      prev = cur;
    end
    checks++;
    if (n_bypass == 0 || n_fir == 0) begin
      failures++;
      $display("FAIL: both modes not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #((CYCLES + 100) * 1000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
