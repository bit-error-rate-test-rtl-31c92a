// End-to-end testbench of prbs_bert_top at its default parameters
// (10 ms debounce at 50 MHz, 4-bit PRBS, seed 1100, pattern 1010).
//
// The top's DAC output drives link_model, whose ADC samples come back to the
// top.  The run goes through:
//   1. Method 1 on a full-swing link of 3 clocks: errors are counted before
//      the receive LFSR is loaded; a bouncing press is ignored; a clean
//      press synchronises the receiver and the count stays at zero; injected
//      bit errors are counted one for one.
//   2. Reference training on an attenuated link (both levels above
//      mid-scale), checked against the mean of the two levels.
//   3. Switch to Method 2 on the attenuated link of 5 clocks with the
//      reference back at mid-scale: the first pattern fails but trains the
//      reference and the retry passes.  Restart Method 2 and corrupt the
//      first pattern on the link: it is retried and the second passes; a
//      press loads both LFSRs, the count stays zero, injected errors are
//      counted one for one.
//   4. A dead link (a single level) makes every pattern check fail: after
//      four attempts channel_fail is raised.
//   5. Method 1 with the transmitter looped back inside the FPGA.
//   6. Method 2 over a 4-clock wire from tx_pin to rx_pin, with injected
//      errors.
// Every mechanism must have happened at least once.
module tb_prbs_bert_top;
  import bert_pkg::*;

  localparam int unsigned DEB = 500_000;   // default debounce window

  logic clk = 1'b0, rst_n = 1'b0;
  method_e method = METHOD1;
  rx_src_e rx_src = RX_ADC;
  logic tx_pin, rx_pin;
  logic btn_load_n = 1'b1;
  logic [DELAY_W-1:0] ext_delay = 16'd3;
  conv_t dac_a, dac_b, adc_sample;
  logic ref_train = 1'b0, ref_load = 1'b0;
  conv_t ref_in = '0, ref_q;
  logic tx_bit, rx_bit, bit_error;
  logic [ERR_W-1:0] err_count;
  logic [BITS_W-1:0] bit_count;
  logic led_no_error, led_error, led_pattern_error, led_no_pattern_error, channel_fail;
  logic [2:0] init_tries;
  logic btn_level;
  lfsr_t tx_state, rx_state, rx_reg, rx_seed_q;

  conv_t hi_level = 14'h3800, lo_level = 14'h0800;
  logic  flip = 1'b0;

  prbs_bert_top dut (.*);

  link_model u_link (.clk, .dac_word(dac_a), .delay(ext_delay), .hi_level, .lo_level,
                     .flip, .adc_sample);

  always #10 clk = ~clk;   // 50 MHz

  // loopback wire between tx_pin and rx_pin: ext_delay clocks, with flips
  logic pin_hist [64];
  always @(posedge clk) begin
    for (int i = 63; i > 0; i--) pin_hist[i] <= pin_hist[i-1];
    pin_hist[0] <= tx_pin;
  end
  assign rx_pin = ((ext_delay == 0) ? tx_pin : pin_hist[ext_delay - 1]) ^ flip;

  int checks = 0, failures = 0;

  // transmitter state history: tx_hist[i] = state i+1 clocks ago
  lfsr_t tx_hist [64];
  always @(posedge clk) begin
    for (int i = 63; i > 0; i--) tx_hist[i] <= tx_hist[i-1];
    tx_hist[0] <= tx_state;
  end
  // mechanism counters
  int n_err_before_load = 0, n_bounce_ignored = 0, n_m1_sync = 0, n_m1_errors = 0;
  int n_trained = 0, n_mode_switch = 0, n_pattern_retry = 0, n_pattern_ok = 0;
  int n_m2_sync = 0, n_m2_errors = 0, n_channel_fail = 0, n_auto_trained = 0;
  int n_internal_lb = 0, n_pin_lb = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic check_true(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic cycles(int n);
    repeat (n) @(negedge clk);
  endtask

  // short bounces, then held low long enough, then released and settled
  task automatic press();
    for (int b = 0; b < 3; b++) begin
      btn_load_n = 1'b0; cycles(1000 + b * 500);
      btn_load_n = 1'b1; cycles(700);
    end
    btn_load_n = 1'b0; cycles(DEB + 10);
    btn_load_n = 1'b1; cycles(DEB + 10);
  endtask

  // inject n single-bit errors, spaced apart; return how many were injected
  task automatic inject(int n);
    for (int i = 0; i < n; i++) begin
      cycles(20 + ($urandom % 30));
      flip = 1'b1; cycles(1); flip = 1'b0;
    end
    cycles(30);
  endtask

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e0, b0;
    cycles(3);
    rst_n = 1'b1;

    // ---------------- 1. Method 1
    cycles(200);
    check_true("method 1: errors before load", err_count > 0 && led_error);
    if (err_count > 0) n_err_before_load++;
    // bouncing press: first part of press() checked on its own
    for (int b = 0; b < 3; b++) begin
      btn_load_n = 1'b0; cycles(1000 + b * 500);
      btn_load_n = 1'b1; cycles(700);
      check_true("bounce ignored", btn_level == 1'b1);
      if (btn_level) n_bounce_ignored++;
    end
    check_true("bounces did not load", err_count > 1000);
    press();
    check("method 1: no errors after load", err_count, 0);
    check_true("method 1: LED 3 on", led_no_error && !led_error);
    check_true("method 1: bits counted", bit_count > DEB);
    for (int k = 0; k < 50; k++) begin
      check("method 1: seed register = transmitter state D clocks ago",
            rx_seed_q, tx_hist[ext_delay + 2 - 1]);
      check("method 1: receive LFSR = transmitter state D+1 clocks ago",
            rx_state, tx_hist[ext_delay + 2]);
      cycles(1);
    end
    if (err_count == 0) n_m1_sync++;
    e0 = err_count;
    inject(25);
    check("method 1: injected errors counted", err_count - e0, 25);
    if (err_count - e0 == 25) n_m1_errors++;
    check_true("method 1: LED 4 on", led_error && !led_no_error);

    // ---------------- 2. reference training on an attenuated link
    hi_level = 14'h2C00; lo_level = 14'h2400;
    cycles(10);
    ref_train = 1'b1; cycles(300); ref_train = 1'b0; cycles(2);
    check_true("trained reference between the levels",
               ref_q > 14'h2400 + 14'd31 && ref_q < 14'h2C00);
    check_true("trained reference near the mean",
               ref_q >= 14'h2800 && ref_q <= 14'h2800 + 14'd32);
    if (ref_q > 14'h2400 + 14'd31 && ref_q < 14'h2C00) n_trained++;

    // ---------------- 3a. Method 2, reference set back to mid-scale: the
    // first pattern reads as all ones and fails, but trains the reference
    ext_delay = 16'd5;
    ref_in = 14'h2000; ref_load = 1'b1; cycles(1); ref_load = 1'b0;
    method = METHOD2;
    n_mode_switch++;
    cycles(60);
    check("method 2: first attempt fails on the old reference", init_tries, 1);
    check_true("method 2: pattern trains the reference",
               ref_q > 14'h2400 + 14'd31 && ref_q < 14'h2C00);
    check_true("method 2: retry passes on the trained reference", led_no_pattern_error);
    if (init_tries == 1 && led_no_pattern_error) n_auto_trained++;

    // ---------------- 3b. restart Method 2 with one corrupted pattern
    method = METHOD1; cycles(5);
    method = METHOD2;
    n_mode_switch++;
    // the pattern leaves right after the switch and arrives 7 clocks
    // later: corrupt the link while it arrives
    cycles(6);
    flip = 1'b1; cycles(5); flip = 1'b0;
    cycles(40);
    check("method 2: one failed attempt", init_tries, 1);
    if (init_tries == 1) n_pattern_retry++;
    check_true("method 2: pattern received on retry", led_no_pattern_error && !led_pattern_error);
    if (led_no_pattern_error) n_pattern_ok++;
    check("method 2: no counting before load", bit_count, 0);
    press();
    check("method 2: no errors after load", err_count, 0);
    check_true("method 2: bits counted", bit_count > DEB);
    if (err_count == 0 && bit_count > DEB) n_m2_sync++;
    e0 = err_count; b0 = bit_count;
    inject(40);
    check("method 2: injected errors counted", err_count - e0, 40);
    if (err_count - e0 == 40) n_m2_errors++;

    // ---------------- 4. dead link (one level only): channel failure
    hi_level = 14'h2600; lo_level = 14'h2600;
    method = METHOD1; cycles(5);
    method = METHOD2; n_mode_switch++;
    cycles(200);
    check_true("channel failure raised", channel_fail);
    check("channel failure after four attempts", init_tries, 4);
    if (channel_fail) n_channel_fail++;

    // ---------------- 5. loopback inside the FPGA, Method 1
    rx_src = RX_INTERNAL; ext_delay = 16'd0;
    method = METHOD1; n_mode_switch++;
    cycles(50);
    press();
    check("internal loopback: no errors", err_count, 0);
    check_true("internal loopback: bits counted", bit_count > DEB);
    if (err_count == 0 && bit_count > DEB) n_internal_lb++;

    // ---------------- 6. loopback wire between two pins, Method 2
    rx_src = RX_PIN; ext_delay = 16'd4;
    method = METHOD2; n_mode_switch++;
    cycles(40);
    check("pin loopback: pattern passes first time", init_tries, 0);
    check_true("pin loopback: pattern ok", led_no_pattern_error);
    press();
    check("pin loopback: no errors", err_count, 0);
    e0 = err_count;
    inject(10);
    check("pin loopback: injected errors counted", err_count - e0, 10);
    if (err_count - e0 == 10 && init_tries == 0) n_pin_lb++;

    // ---------------- mechanisms
    check_true("mechanism: errors before load", n_err_before_load > 0);
    check_true("mechanism: bounce rejected", n_bounce_ignored > 0);
    check_true("mechanism: method 1 sync", n_m1_sync > 0);
    check_true("mechanism: method 1 error count", n_m1_errors > 0);
    check_true("mechanism: reference training", n_trained > 0);
    check_true("mechanism: method switch", n_mode_switch > 0);
    check_true("mechanism: pattern retry", n_pattern_retry > 0);
    check_true("mechanism: reference trained by the pattern", n_auto_trained > 0);
    check_true("mechanism: internal loopback", n_internal_lb > 0);
    check_true("mechanism: pin loopback", n_pin_lb > 0);
    check_true("mechanism: pattern ok", n_pattern_ok > 0);
    check_true("mechanism: method 2 sync", n_m2_sync > 0);
    check_true("mechanism: method 2 error count", n_m2_errors > 0);
    check_true("mechanism: channel failure", n_channel_fail > 0);
    $display("mechanisms: err_before_load=%0d bounce=%0d m1_sync=%0d m1_err=%0d trained=%0d switch=%0d retry=%0d pattern_ok=%0d m2_sync=%0d m2_err=%0d fail=%0d auto_trained=%0d internal_lb=%0d pin_lb=%0d",
             n_err_before_load, n_bounce_ignored, n_m1_sync, n_m1_errors, n_trained,
             n_mode_switch, n_pattern_retry, n_pattern_ok, n_m2_sync, n_m2_errors, n_channel_fail,
             n_auto_trained, n_internal_lb, n_pin_lb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
