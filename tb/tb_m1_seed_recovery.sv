// Self-checking testbench of m1_seed_recovery.
// Feeds the MSB of a reference 4-bit LFSR (x^4 + x^3 + 1, written out here
// independently) and checks, once four bits have arrived, that rx_reg holds
// the state of three steps before the newest bit and rx_seed the state one
// step after it, i.e. the transmitter state one clock later.  Includes the
// worked example: bits 1,1,0,0 give rx_reg 1100 and rx_seed 0100.
module tb_m1_seed_recovery;
  import bert_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, rx_bit = 1'b0;
  lfsr_t rx_reg, rx_seed;
  int checks = 0, failures = 0;

  m1_seed_recovery dut (.*);

  always #5 clk = ~clk;

  function automatic lfsr_t step(lfsr_t s);
    return {s[2], s[1], s[0], s[3] ^ s[2]};
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lfsr_t hist [$];
    lfsr_t s;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int seed = 1; seed < 16; seed++) begin
      s = lfsr_t'(seed);
      hist.delete();
      for (int k = 0; k < 30; k++) begin
        rx_bit = s[3];
        hist.push_back(s);
        @(negedge clk);
        if (k >= 3) begin
          check($sformatf("seed %0h k %0d rx_reg", seed, k), rx_reg, hist[k-3]);
          check($sformatf("seed %0h k %0d rx_seed", seed, k), rx_seed, step(s));
        end
        if (seed == 12 && k == 3) begin
          check("example rx_reg", rx_reg, 4'b1100);
          check("example rx_seed", rx_seed, 4'b0100);
        end
        s = step(s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
