// Self-checking testbench of adc_slicer.
// Method 1: the bit is the sample's MSB.  Method 2: the bit is
// (sample > reference), first with the mid-scale default, then with a
// reference trained on a narrow two-level signal (expected value computed
// here as the mean of the smallest and largest training sample), then with
// a loaded reference.  The bit must appear one clock after the sample.
module tb_adc_slicer;
  import bert_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, train = 1'b0, ref_load = 1'b0;
  method_e method = METHOD1;
  conv_t sample = '0, ref_in = '0, ref_q;
  logic bit_out;
  int checks = 0, failures = 0;

  adc_slicer dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // apply a sample, return the bit seen one clock later
  task automatic slice(conv_t s, conv_t r, string what);
    sample = s;
    @(negedge clk);
    if (method == METHOD1) check(what, bit_out, s[CONV_W-1]);
    else                   check(what, bit_out, (s > r) ? 1 : 0);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    conv_t lo, hi, mn, mx, exp_ref;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check("default reference", ref_q, 14'h2000);
    method = METHOD1;
    for (int i = 0; i < 100; i++) slice(conv_t'($urandom), '0, "sign bit");
    method = METHOD2;
    for (int i = 0; i < 100; i++) slice(conv_t'($urandom), 14'h2000, "default threshold");
    // narrow signal entirely above mid-scale: levels near 0x2400 and 0x2C00
    mn = '1; mx = '0;
    train = 1'b1;
    for (int i = 0; i < 40; i++) begin
      sample = (i % 3 == 0) ? conv_t'(14'h2C00 + ($urandom % 64)) : conv_t'(14'h2400 + ($urandom % 64));
      if (sample < mn) mn = sample;
      if (sample > mx) mx = sample;
      @(negedge clk);
    end
    train = 1'b0;
    @(negedge clk);
    exp_ref = conv_t'((int'(mn) + int'(mx)) / 2);
    check("trained reference", ref_q, exp_ref);
    for (int i = 0; i < 100; i++) begin
      lo = conv_t'(14'h2400 + ($urandom % 64));
      hi = conv_t'(14'h2C00 + ($urandom % 64));
      slice(($urandom % 2) ? hi : lo, exp_ref, "trained threshold");
    end
    // loaded reference
    ref_in = 14'h1234; ref_load = 1'b1;
    @(negedge clk); ref_load = 1'b0;
    check("loaded reference", ref_q, 14'h1234);
    for (int i = 0; i < 50; i++) slice(conv_t'($urandom), 14'h1234, "loaded threshold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
