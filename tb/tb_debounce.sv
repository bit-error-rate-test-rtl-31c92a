// Self-checking testbench of debounce (STABLE_CYCLES reduced to 20).
// A bounce shorter than the window must not reach the output; a clean press
// must appear exactly STABLE_CYCLES + 2 clocks after the edge, with one fall
// pulse, and a clean release one rise pulse.
module tb_debounce;
  localparam int unsigned N = 20;
  logic clk = 1'b0, rst_n = 1'b0, btn = 1'b1;
  logic level, fall, rise;
  int checks = 0, failures = 0;
  int falls = 0, rises = 0;

  debounce #(.STABLE_CYCLES(N), .RESET_LEVEL(1'b1)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    if (fall) falls++;
    if (rise) rises++;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
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
    int t;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    check("idle level", level, 1);
    // bounces: low for up to N-2 clocks at a time
    for (int b = 0; b < 6; b++) begin
      btn = 1'b0; repeat (2 + b * 3) @(negedge clk);
      btn = 1'b1; repeat (3) @(negedge clk);
      check($sformatf("bounce %0d ignored", b), level, 1);
    end
    repeat (N + 5) @(negedge clk);
    check("no fall after bounces", falls, 0);
    // clean press
    btn = 1'b0;
    t = 0;
    while (level == 1'b1 && t < 10 * N) begin
      @(negedge clk); t++;
    end
    check("press latency", t, N + 2);
    repeat (5) @(negedge clk);
    check("one fall pulse", falls, 1);
    check("pressed level", level, 0);
    btn = 1'b1;
    repeat (N + 5) @(negedge clk);
    check("released level", level, 1);
    check("one rise pulse", rises, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
