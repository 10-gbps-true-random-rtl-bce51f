// spi_regs_tb: checks the SPI shift register.
//
// Random 20-bit words are shifted in MSB first. After each word the
// parallel content must equal the word, and while it was shifted in, sdo
// must have returned the previous word, MSB first.
module spi_regs_tb;
  timeunit 1ps; timeprecision 1ps;

  localparam int W = 20;
  localparam int WORDS = 30;

  int checks = 0;
  int failures = 0;

  logic         scl = 1'b0;
  logic         sdi = 1'b0;
  logic         sdo;
  logic [W-1:0] shreg;

  spi_regs dut (.scl(scl), .sdi(sdi), .sdo(sdo), .shreg(shreg));

  task automatic shift_word(input logic [W-1:0] wr, output logic [W-1:0] rd);
    for (int i = W - 1; i >= 0; i--) begin
      sdi = wr[i];
      rd[i] = sdo;
      #5000 scl = 1'b1;
      #5000 scl = 1'b0;
    end
  endtask

  initial begin
    logic [W-1:0] prev, cur, back;
    prev = W'($urandom);
    shift_word(prev, back);
    for (int k = 0; k < WORDS; k++) begin
      cur = W'($urandom);
      shift_word(cur, back);
      checks++;
      if (shreg !== cur) begin
        failures++;
        $display("FAIL: word %0d shreg=%h expected %h", k, shreg, cur);
      end
      checks++;
      if (back !== prev) begin
        failures++;
        $display("FAIL: word %0d readback=%h expected %h", k, back, prev);
      end
      prev = cur;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #((WORDS + 5) * W * 10000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
