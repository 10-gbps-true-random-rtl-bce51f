// trng_channel: one of the random bit channels.
//
// How it works: N_OSC independent ring oscillators run freely; their
// outputs are sampled on clk and XORed together by a pipelined tree of
// 2-input XOR gates (xor_sampler_tree). Each oscillator alone has too
// little jitter to give a random sample, but the XOR of many independent
// jittered square waves has edges spread evenly over the whole sampling
// period, so each sample is random. The raw bit then passes through the
// FIR11 post-processing or its bypass (fir_postproc).
//
// Interface and timing: one bit on td per rising edge of clk. td holds the
// result of the oscillator sample taken LEVELS+1 clocks earlier
// (9 clocks for 256 oscillators). osc_en stops all oscillators of the
// channel (their outputs then rest at 1) to save power; bypass selects raw
// (1) or filtered (0) data. 256 oscillators per channel, the XOR tree and
// the post-processing follow the published design; one enable per channel
// and the mismatch offsets given to the oscillator models are this
// design's own.
module trng_channel #(
  parameter int unsigned N_OSC = trng_pkg::N_OSC
) (
  input  logic clk,
  input  logic osc_en,
  input  logic bypass,
  output logic td
);
  timeunit 1ps; timeprecision 1ps;

  logic [N_OSC-1:0] osc_q;
  logic             raw;

  for (genvar i = 0; i < N_OSC; i++) begin : g_osc
    // Spread the stage delay over -2..+2 ps between instances.
    ring_osc #(.OFFSET_PS(int'((i * 7) % 5) - 2)) u_osc (
      .en(osc_en),
      .q (osc_q[i])
    );
  end

  xor_sampler_tree #(.N_IN(N_OSC)) u_tree (
    .clk(clk),
    .osc(osc_q),
    .raw(raw)
  );

  fir_postproc u_post (
    .clk   (clk),
    .bypass(bypass),
    .raw   (raw),
    .td    (td)
  );
endmodule
