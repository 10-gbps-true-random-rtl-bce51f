// setting_regs_tb: checks the setting registers.
//
// Random settings words are presented and loaded with a pulse on sld. The
// bypass field must then equal bits 19..10 of the word and the oscillator
// enable field bits 9..0. A change of the input without a load pulse must
// leave the settings as they were.
module setting_regs_tb;
  timeunit 1ps; timeprecision 1ps;
  import trng_pkg::*;

  localparam int WORDS = 40;

  int checks = 0;
  int failures = 0;

  logic                sld = 1'b0;
  logic [CFG_BITS-1:0] shreg;
  trng_cfg_t           cfg;

  setting_regs dut (.sld(sld), .shreg(shreg), .cfg(cfg));

  initial begin
    logic [CFG_BITS-1:0] w;
    for (int k = 0; k < WORDS; k++) begin
      w = CFG_BITS'($urandom);
      shreg = w;
      #1000 sld = 1'b1;
      #1000 sld = 1'b0;
      checks++;
      if (cfg.bypass !== w[19:10] || cfg.osc_en !== w[9:0]) begin
        failures++;
        $display("FAIL: load %0d bypass=%b osc_en=%b word=%b", k, cfg.bypass, cfg.osc_en, w);
      end
      shreg = ~w;
      #1000;
      checks++;
      if (cfg !== trng_cfg_t'(w)) begin
        failures++;
        $display("FAIL: settings changed without a load");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(WORDS * 10000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
