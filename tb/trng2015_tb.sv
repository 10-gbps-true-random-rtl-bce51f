// trng2015_tb: end-to-end test of the whole chip at its full size
// (10 channels of 256 ring oscillators, 1 GHz sampling clock).
//
// Everything is driven through the chip's pins. Settings words are shifted
// in over SPI (SCL at 100 MHz, MSB first) and loaded with SLD; the word
// shifted out on SDO must be the previous word. A reference model reads
// each channel's 256 sampling flip-flops after every clock, computes their
// parity itself and predicts every TD bit: the parity 9 clocks back with
// bypass set, or its XOR with the parity one clock older (FIR11) with
// bypass clear, and 0 for a stopped channel. Three configurations are run:
// all oscillators stopped; all running with alternate channels bypassed;
// half the channels stopped and the bypass bits inverted. Each mechanism
// (stopped channel, raw output, FIR11 output, settings load, SPI
// readback, restart of a stopped channel) is counted and must occur. Each
// running channel must give 30..70% ones. The first 12 clocks after each
// load are not checked.
module trng2015_tb;
  timeunit 1ps; timeprecision 1ps;
  import trng_pkg::*;

  localparam int N = N_OSC;
  localparam int LAT = 9;
  localparam int SETTLE = 12;
  localparam int RUN = 300;
  localparam int MAXC = 4000;
  localparam longint WATCHDOG_PS = longint'(MAXC) * 1000;

  int checks = 0;
  int failures = 0;

  logic              SCL = 1'b0;
  logic              SDI = 1'b0;
  logic              SDO;
  logic              SLD = 1'b0;
  logic              CLK = 1'b0;
  logic [NUM_CH-1:0] TD;

  trng2015 dut (.SCL(SCL), .SDI(SDI), .SDO(SDO), .SLD(SLD), .CLK(CLK), .TD(TD));

  always #500 CLK = ~CLK;

  // Per-channel parity of the sampling flip-flops, one entry per clock.
  bit [NUM_CH-1:0] p [MAXC];
  bit [NUM_CH-1:0] p_now;
  int cyc = 0;

  for (genvar c = 0; c < NUM_CH; c++) begin : g_ref
    always @(posedge CLK) begin
      #100;
      p_now[c] = ^dut.g_ch[c].u_ch.u_tree.node[2*N-1:N];
    end
  end

  always @(posedge CLK) begin
    #200;
    p[cyc] = p_now;
    cyc++;
  end

  // Mechanism counters.
  int n_stopped = 0, n_raw = 0, n_fir = 0, n_load = 0, n_readback = 0, n_restart = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: cycle %0d: %s", cyc, what);
    end
  endtask

  trng_cfg_t cur_cfg;
  logic [CFG_BITS-1:0] last_shifted;
  bit have_last = 0;

  task automatic spi_load(input trng_cfg_t cfg);
    logic [CFG_BITS-1:0] w, back;
    w = CFG_BITS'(cfg);
    for (int i = CFG_BITS - 1; i >= 0; i--) begin
      SDI = w[i];
      back[i] = SDO;
      #5000 SCL = 1'b1;
      #5000 SCL = 1'b0;
    end
    if (have_last) begin
      check(back == last_shifted, $sformatf("SDO readback %h expected %h", back, last_shifted));
      n_readback++;
    end
    last_shifted = w;
    have_last = 1;
    #1000 SLD = 1'b1;
    #1000 SLD = 1'b0;
    n_load++;
    for (int c = 0; c < NUM_CH; c++)
      if (have_last && cur_cfg.osc_en[c] == 1'b0 && cfg.osc_en[c] == 1'b1 && n_load > 1) n_restart++;
    cur_cfg = cfg;
  endtask

  // Runs n clocks and checks every TD bit against the reference model.
  task automatic run_check(input int n, output int ones [NUM_CH]);
    bit e;
    int m;
    for (int c = 0; c < NUM_CH; c++) ones[c] = 0;
    for (int k = 0; k < n; k++) begin
      @(posedge CLK);
      #300;
      m = cyc - 1;
      if (k < SETTLE) continue;
      for (int c = 0; c < NUM_CH; c++) begin
        e = cur_cfg.bypass[c] ? p[m - LAT][c] : (p[m - LAT][c] ^ p[m - LAT - 1][c]);
        check(TD[c] == e, $sformatf("ch%0d TD=%b expected %b (en=%b bypass=%b)",
                                    c, TD[c], e, cur_cfg.osc_en[c], cur_cfg.bypass[c]));
        if (!cur_cfg.osc_en[c]) begin
          check(TD[c] == 1'b0, $sformatf("stopped ch%0d outputs 0", c));
          n_stopped++;
        end else if (cur_cfg.bypass[c]) begin
          n_raw++;
        end else begin
          n_fir++;
        end
        if (TD[c]) ones[c]++;
      end
    end
  endtask

  task automatic check_ones(input int ones [NUM_CH], input int n);
    for (int c = 0; c < NUM_CH; c++) begin
      if (!cur_cfg.osc_en[c]) continue;
      check(ones[c] > n * 30 / 100 && ones[c] < n * 70 / 100,
            $sformatf("ch%0d ones %0d of %0d", c, ones[c], n));
    end
  endtask

  initial begin
    int ones [NUM_CH];
    trng_cfg_t cfg;
    cur_cfg = '0;

    // 1: everything stopped.
    cfg.osc_en = '0;
    cfg.bypass = '1;
    spi_load(cfg);
    run_check(40, ones);

    // 2: all running, even channels raw, odd channels FIR11.
    cfg.osc_en = '1;
    cfg.bypass = 10'b0101010101;
    spi_load(cfg);
    run_check(RUN, ones);
    check_ones(ones, RUN - SETTLE);
    $display("config 2 ones per channel: %p", ones);

    // 3: upper five channels stopped, bypass bits inverted.
    cfg.osc_en = 10'b0000011111;
    cfg.bypass = 10'b1010101010;
    spi_load(cfg);
    run_check(RUN, ones);
    check_ones(ones, RUN - SETTLE);

    // 4: restart the stopped channels.
    cfg.osc_en = '1;
    spi_load(cfg);
    run_check(60, ones);

    $display("mechanisms: stopped=%0d raw=%0d fir=%0d load=%0d readback=%0d restart=%0d",
             n_stopped, n_raw, n_fir, n_load, n_readback, n_restart);
    check(n_stopped > 0, "stopped channel exercised");
    check(n_raw > 0, "bypass (raw) output exercised");
    check(n_fir > 0, "FIR11 output exercised");
    check(n_load > 0, "settings load exercised");
    check(n_readback > 0, "SPI readback exercised");
    check(n_restart > 0, "oscillator restart exercised");
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
