// Self-checking testbench of dac_mapper.
// Drives random bits and checks that one clock later both channels carry
// the high code for a 1 and the low code for a 0.
module tb_dac_mapper;
  import bert_pkg::*;
  localparam conv_t HI = 14'h3A5C, LO = 14'h0123;
  logic clk = 1'b0, rst_n = 1'b0, bit_in = 1'b0;
  conv_t dac_a, dac_b;
  int checks = 0, failures = 0;

  dac_mapper #(.CODE_HIGH(HI), .CODE_LOW(LO)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev;
    repeat (2) @(negedge clk);
    checks++; if (dac_a != LO || dac_b != LO) failures++;
    rst_n = 1'b1;
    prev = 1'b0;
    for (int i = 0; i < 200; i++) begin
      bit_in = 1'($urandom);
      @(negedge clk);
      checks++;
      if (dac_a != (bit_in ? HI : LO) || dac_b != dac_a) begin
        failures++;
        $display("FAIL bit %0d: a=%h b=%h", bit_in, dac_a, dac_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
