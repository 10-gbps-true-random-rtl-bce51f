// ring_osc: behavioural model of one free-running ring oscillator.
// This is not synthesizable logic: the real part is a three-stage ring of
// one NAND gate and two inverters whose edge jitter is the analog entropy
// source, and the model only mimics its timing.
//
// How it works: an edge travels round the ring NAND -> inverter ->
// inverter -> back to the NAND. Each stage takes STAGE_PS picoseconds plus
// a random 0..JITTER_PS ps (minus half of JITTER_PS, so the mean stays at
// STAGE_PS), drawn anew on every transition. Six stage delays make one
// period: 6 x 35 ps = 210 ps, about 4.7 GHz as published. OFFSET_PS
// shifts the stage delay of one instance to stand for process mismatch.
//
// Interface: en is the NAND's control input. With en = 0 the NAND output
// is forced high, the ring stops after two stage delays and q rests at 1.
// When en rises the ring starts again. q is the ring output that the
// sampling flip-flop sees. The three-stage NAND ring and its enable follow
// the published design; the delay values and the jitter law are this
// model's own.
module ring_osc #(
  parameter int STAGE_PS  = 35,
  parameter int JITTER_PS = 2,
  parameter int OFFSET_PS = 0
) (
  input  logic en,
  output logic q
);
  timeunit 1ps; timeprecision 1ps;

  localparam int BASE_PS = STAGE_PS + OFFSET_PS - JITTER_PS / 2;

  logic n_nand;  // NAND output
  logic n_inv1;  // first inverter output; the second inverter drives q

  initial begin
    n_nand = 1'b1;
    n_inv1 = 1'b0;
    q      = 1'b1;
    forever begin
      if (!en) begin
        // NAND forced high; the stop state settles through the inverters.
        n_nand = 1'b1;
        #(BASE_PS) n_inv1 = 1'b0;
        #(BASE_PS) q      = 1'b1;
        wait (en);
      end
      #(BASE_PS); repeat ($urandom_range(JITTER_PS)) #1; n_nand = ~(en & q);
      #(BASE_PS); repeat ($urandom_range(JITTER_PS)) #1; n_inv1 = ~n_nand;
      #(BASE_PS); repeat ($urandom_range(JITTER_PS)) #1; q      = ~n_inv1;
    end
  end
endmodule
