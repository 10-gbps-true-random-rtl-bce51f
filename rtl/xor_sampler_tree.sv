// xor_sampler_tree: samples N_IN asynchronous oscillator outputs and merges
// them into one bit per clock.
//
// How it works: every input first goes through a D flip-flop on clk; that
// flip-flop is where the randomness is decided, because it samples the
// jittered oscillator edge. The samples are then combined by a tree of
// 2-input XOR gates with a flip-flop after every gate, so no gate ever sees
// an asynchronous input and each level only has one gate delay per clock.
// A 256-input tree has 8 XOR levels. Sampling flops on the oscillator
// outputs, 2-input XOR gates and a flip-flop after each gate follow the
// published design; zero padding for sizes that are not a power of two is
// this design's own.
//
// Interface and timing: osc is sampled on the rising edge of clk; raw
// carries the XOR of that sample LEVELS rising edges later
// (LEVELS = clog2(N_IN), 8 for 256 inputs). One new bit every clock.
// There is no reset: the pipeline flushes itself after LEVELS+1 clocks.
module xor_sampler_tree #(
  parameter int unsigned N_IN = 256
) (
  input  logic            clk,
  input  logic [N_IN-1:0] osc,
  output logic            raw
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned LEVELS = (N_IN > 1) ? $clog2(N_IN) : 0;
  localparam int unsigned N_PAD  = 1 << LEVELS;

  // The tree is kept as a heap: node[1] is the root, node i has children
  // 2i and 2i+1, and nodes N_PAD..2*N_PAD-1 are the sampling flip-flops.
  // Every node is a flip-flop.
  logic [2*N_PAD-1:1] node;

  always_ff @(posedge clk) begin
    node[2*N_PAD-1:N_PAD] <= N_PAD'(osc);
  end

  for (genvar i = 1; i < N_PAD; i++) begin : g_xor
    always_ff @(posedge clk) begin
      node[i] <= node[2*i] ^ node[2*i+1];
    end
  end

  assign raw = node[1];
endmodule
