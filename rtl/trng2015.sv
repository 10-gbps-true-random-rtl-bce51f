// trng2015: top level of a 10-channel true random number generator.
//
// How it works: ten identical channels (trng_channel) each XOR 256 jittery
// ring oscillators sampled by the shared clock CLK, optionally pass the
// result through FIR11 post-processing, and put one random bit per clock
// on their TD line: at a 1 GHz clock that is 1 Gbit/s per channel and
// 10 Gbit/s in total. The chip is configured through a 4-wire SPI port:
// a settings word shifted in on SCL/SDI (read back on SDO) is copied into
// the setting registers on a rising edge of SLD. The settings give each
// channel an oscillator enable and a post-processing bypass.
//
// Interface and timing: all channels share CLK and are aligned to it; TD
// reflects the oscillator samples taken 9 CLK cycles earlier. On the chip
// CLK is an LVDS input and TD are LVDS outputs; here they are plain
// single-ended ports, as the pads are not modelled. There is no reset
// pin: load the settings before using TD, and discard the first 10 bits
// after enabling a channel. Ten channels of 256 oscillators, the XOR tree,
// FIR11 with bypass and the SPI-programmed setting registers follow the
// published design; the settings layout and the SPI protocol are this
// design's own.
module trng2015
  import trng_pkg::*;
#(
  parameter int unsigned N_OSC_PER_CH = N_OSC
) (
  input  logic              SCL,
  input  logic              SDI,
  output logic              SDO,
  input  logic              SLD,
  input  logic              CLK,
  output logic [NUM_CH-1:0] TD
);
  timeunit 1ps; timeprecision 1ps;

  logic [CFG_BITS-1:0] shreg;
  trng_cfg_t           cfg;

  spi_regs #(.W(CFG_BITS)) u_spi (
    .scl  (SCL),
    .sdi  (SDI),
    .sdo  (SDO),
    .shreg(shreg)
  );

  setting_regs u_set (
    .sld  (SLD),
    .shreg(shreg),
    .cfg  (cfg)
  );

  for (genvar c = 0; c < NUM_CH; c++) begin : g_ch
    trng_channel #(.N_OSC(N_OSC_PER_CH)) u_ch (
      .clk   (CLK),
      .osc_en(cfg.osc_en[c]),
      .bypass(cfg.bypass[c]),
      .td    (TD[c])
    );
  end
endmodule
