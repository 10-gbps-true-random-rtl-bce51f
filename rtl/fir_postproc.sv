// fir_postproc: FIR11 post-processing with bypass for one channel.
//
// How it works: the filter is a binary FIR filter over GF(2). With the
// coefficients 1,1 it outputs the XOR of the current raw bit and the one
// before it, y[n] = x[n] ^ x[n-1]. This evens out a bias of the raw bits
// without lowering the data rate. The bypass input picks the raw bit
// instead, and the chosen bit is registered onto td. TAPS holds the
// coefficients, bit k weighting x[n-k]; TAPS = 2'b11 is FIR11.
//
// Interface and timing: one bit in and one bit out per rising edge of clk;
// td carries the result for raw one clock after raw was presented. bypass
// is a static setting (1 = raw data, 0 = filtered data). The presence of
// FIR11 and of a bypass follows the published design; reading "FIR11" as
// the (1,1) coefficient filter, the bypass polarity and the output register
// are this design's own choices.
module fir_postproc #(
  parameter int unsigned NTAPS = 2,
  parameter logic [NTAPS-1:0] TAPS = 2'b11
) (
  input  logic clk,
  input  logic bypass,
  input  logic raw,
  output logic td
);
  timeunit 1ps; timeprecision 1ps;

  // hist[k] = x[n-k]; hist[0] is the current input.
  logic [NTAPS-1:0] hist;
  logic             fir;

  assign hist[0] = raw;
  if (NTAPS > 1) begin : g_delay
    always_ff @(posedge clk) begin
      hist[NTAPS-1:1] <= hist[NTAPS-2:0];
    end
  end

  assign fir = ^(hist & TAPS);

  always_ff @(posedge clk) begin
    td <= bypass ? raw : fir;
  end
endmodule
