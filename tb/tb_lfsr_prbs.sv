// Self-checking testbench of lfsr_prbs.
// Checks the reset seed, the 15-state sequence from seed F against a
// hand-written table of states and output bits, the four-step example
// 1100 -> 0100, load priority over enable, hold when disabled and the
// period of 15 from every non-zero seed.
module tb_lfsr_prbs;
  import bert_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, enable = 1'b0;
  lfsr_t seed = '0, state;
  logic prbs;
  int checks = 0, failures = 0;

  lfsr_prbs #(.RESET_SEED(4'h9)) dut (.*);

  always #5 clk = ~clk;

  // Expected states from seed F, and the MSB output of each.
  localparam logic [3:0] EXP_STATE [16] = '{4'hF, 4'hE, 4'hC, 4'h8, 4'h1, 4'h2, 4'h4, 4'h9,
                                            4'h3, 4'h6, 4'hD, 4'hA, 4'h5, 4'hB, 4'h7, 4'hF};
  localparam logic EXP_BIT [15] = '{1, 1, 1, 1, 0, 0, 0, 1, 0, 0, 1, 1, 0, 1, 0};

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    check("reset seed", state, 4'h9);
    rst_n = 1'b1;
    // load F
    @(negedge clk); load = 1'b1; seed = 4'hF; enable = 1'b1;
    @(negedge clk); load = 1'b0;
    for (int i = 0; i < 16; i++) begin
      check($sformatf("state %0d", i), state, EXP_STATE[i]);
      if (i < 15) check($sformatf("prbs %0d", i), prbs, EXP_BIT[i]);
      @(negedge clk);
    end
    // hold
    enable = 1'b0;
    begin
      lfsr_t held;
      held = state;
      repeat (3) @(negedge clk);
      check("hold", state, held);
    end
    // four steps from 1100 give 0100
    load = 1'b1; seed = 4'b1100; enable = 1'b1;
    @(negedge clk); load = 1'b0;
    repeat (4) @(negedge clk);
    check("four steps from 1100", state, 4'b0100);
    // load wins over enable
    load = 1'b1; seed = 4'h5;
    @(negedge clk); load = 1'b0; enable = 1'b0;
    check("load priority", state, 4'h5);
    // period 15 from every non-zero seed
    for (int s = 1; s < 16; s++) begin
      int first_back;
      load = 1'b1; seed = lfsr_t'(s); enable = 1'b1;
      @(negedge clk); load = 1'b0;
      first_back = 0;
      for (int k = 1; k <= 15; k++) begin
        @(negedge clk);
        if (state == lfsr_t'(s) && first_back == 0) first_back = k;
      end
      check($sformatf("period from %0h", s), first_back, 15);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
