// spi_regs: serial side of the 4-wire SPI configuration port.
//
// How it works: a W-bit shift register clocked by scl. On each rising edge
// of scl the register shifts one place towards the MSB and takes sdi into
// bit 0, so a word is sent MSB first. sdo is the MSB, the bit that the
// next shift pushes out: shifting a new word in returns the old one, and
// several chips can be daisy-chained. The parallel content goes to the
// setting registers, which copy it on the load strobe (SLD).
//
// Interface and timing: sdi is sampled on rising scl, sdo changes right
// after rising scl. No reset; the register holds whatever was last shifted
// in. The published design names only the pins SCL, SDI, SDO and SLD of a
// 4-line SPI bus; bit order, clock edge and the readback are this
// design's own choices.
module spi_regs #(
  parameter int unsigned W = trng_pkg::CFG_BITS
) (
  input  logic         scl,
  input  logic         sdi,
  output logic         sdo,
  output logic [W-1:0] shreg
);
  timeunit 1ps; timeprecision 1ps;

  always_ff @(posedge scl) begin
    shreg <= {shreg[W-2:0], sdi};
  end

  assign sdo = shreg[W-1];
endmodule
