// trng_pkg: constants and the settings type shared by the TRNG modules.
//
// The chip has ten parallel channels, each merging 256 ring oscillators.
// Those two numbers are the published configuration. The settings word
// loaded over SPI is this design's own layout: one bypass bit and one
// oscillator-enable bit per channel, bypass bits in the upper half.
package trng_pkg;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned NUM_CH    = 10;   // parallel output channels
  localparam int unsigned N_OSC     = 256;  // ring oscillators per channel
  localparam int unsigned CFG_BITS  = 2 * NUM_CH;

  // Settings word, MSB first on the SPI bus.
  typedef struct packed {
    logic [NUM_CH-1:0] bypass;  // 1: raw data on TD, 0: FIR11-filtered data
    logic [NUM_CH-1:0] osc_en;  // 1: oscillators of the channel run
  } trng_cfg_t;
endpackage
