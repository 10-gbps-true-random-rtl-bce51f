// setting_regs: the chip's setting registers.
//
// How it works: on the rising edge of the SPI load strobe sld the settings
// word in the SPI shift register is copied into these registers, which
// then drive the channels steadily while new data is shifted in. The word
// holds, per channel, the bypass selection of the post-processing and the
// enable of the ring oscillators (trng_pkg::trng_cfg_t).
//
// Interface and timing: cfg changes only on rising sld. The settings are
// static with respect to the sampling clock, so no synchroniser is used;
// change them while the output is not in use. No reset: cfg is undefined
// until the first load. The published design shows a setting register
// block fed from the SPI registers; its contents and the load on SLD are
// this design's own choices, taken from the two settings the design
// describes (bypass and oscillator control).
module setting_regs
  import trng_pkg::*;
(
  input  logic                sld,
  input  logic [CFG_BITS-1:0] shreg,
  output trng_cfg_t           cfg
);
  timeunit 1ps; timeprecision 1ps;

  always_ff @(posedge sld) begin
    cfg <= trng_cfg_t'(shreg);
  end
endmodule
