// Self-checking testbench of bert_counter (widths reduced to 6 and 8 bits
// so saturation is reached).  Random bit pairs with random enable and clear
// are compared with a counting model; the LEDs must follow err_count == 0.
module tb_bert_counter;
  localparam int EW = 6, BW = 8;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, enable = 1'b0, rx_bit = 1'b0, ref_bit = 1'b0;
  logic mismatch, led_no_error, led_error;
  logic [EW-1:0] err_count;
  logic [BW-1:0] bit_count;
  int checks = 0, failures = 0;
  int exp_err = 0, exp_bits = 0, exp_mm = 0;
  int saw_sat = 0;

  bert_counter #(.EW(EW), .BW(BW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      clear   = ($urandom % 400) == 0;
      enable  = ($urandom % 4) != 0;
      rx_bit  = 1'($urandom);
      ref_bit = (($urandom % 3) == 0) ? ~rx_bit : rx_bit;
      if (clear) begin
        exp_err = 0; exp_bits = 0; exp_mm = 0;
      end else if (enable) begin
        exp_mm = rx_bit ^ ref_bit;
        if (exp_mm != 0 && exp_err < (1 << EW) - 1) exp_err++;
        if (exp_bits < (1 << BW) - 1) exp_bits++;
      end else exp_mm = 0;
      @(negedge clk);
      if (exp_err == (1 << EW) - 1) saw_sat++;
      checks++;
      if (err_count != EW'(exp_err) || bit_count != BW'(exp_bits) || mismatch != 1'(exp_mm)
          || led_no_error != (exp_err == 0) || led_error != (exp_err != 0)) begin
        failures++;
        $display("FAIL step %0d: err %0d/%0d bits %0d/%0d", i, err_count, exp_err, bit_count, exp_bits);
      end
    end
    checks++;
    if (saw_sat == 0) begin
      failures++;
      $display("FAIL saturation never reached");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
