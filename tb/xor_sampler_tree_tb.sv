// xor_sampler_tree_tb: checks the sampling XOR tree.
//
// Two trees are driven with random inputs that change away from the clock
// edge: one of the full 256 inputs and one of 5 inputs, which exercises
// the padding of a size that is not a power of two. The testbench keeps
// the parity of every input vector it applied and checks that raw shows
// it exactly clog2(N) clocks after the sampling edge (8 for 256 inputs,
// 3 for 5), so both the function and the pipeline latency are checked.
module xor_sampler_tree_tb;
  timeunit 1ps; timeprecision 1ps;

  localparam int NA = 256;
  localparam int NB = 5;
  localparam int LAT_A = 8;
  localparam int LAT_B = 3;
  localparam int CYCLES = 400;

  int checks = 0;
  int failures = 0;

  logic          clk = 1'b0;
  logic [NA-1:0] in_a;
  logic [NB-1:0] in_b;
  logic          raw_a, raw_b;

  bit par_a [CYCLES];
  bit par_b [CYCLES];

  xor_sampler_tree #(.N_IN(NA)) dut_a (.clk(clk), .osc(in_a), .raw(raw_a));
  xor_sampler_tree #(.N_IN(NB)) dut_b (.clk(clk), .osc(in_b), .raw(raw_b));

  always #500 clk = ~clk;

  function automatic logic [NA-1:0] rand_vec();
    logic [NA-1:0] v;
    for (int i = 0; i < NA; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    in_a = rand_vec();
    in_b = NB'($urandom);
    for (int n = 0; n < CYCLES; n++) begin
      // Edge n samples the vectors set up before it.
      par_a[n] = ^in_a;
      par_b[n] = ^in_b;
      @(posedge clk);
      #100;
      if (n >= LAT_A) begin
        checks++;
        if (raw_a !== par_a[n - LAT_A]) begin
          failures++;
          $display("FAIL: 256-input tree, edge %0d: raw=%b expected %b", n, raw_a, par_a[n - LAT_A]);
        end
      end
      if (n >= LAT_B) begin
        checks++;
        if (raw_b !== par_b[n - LAT_B]) begin
          failures++;
          $display("FAIL: 5-input tree, edge %0d: raw=%b expected %b", n, raw_b, par_b[n - LAT_B]);
        end
      end
      in_a = rand_vec();
      in_b = NB'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #((CYCLES + 100) * 1000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
