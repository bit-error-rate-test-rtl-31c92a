// PRBS generator and bit error rate tester for an optical link.
//
// One FPGA is both ends of the link.  The transmitter is a 4-bit LFSR whose
// MSB, one bit per 50 MHz clock, is mapped to a full-swing 14-bit word on
// both DAC channels.  The DAC drives an amplifier and a Mach-Zehnder
// modulator; the light crosses the fibre, a photodiode and amplifier feed
// the ADC, and its 14-bit samples come back here.  The slicer turns each
// sample into a received bit, and the receiver regenerates the same PRBS
// locally and counts the bits that differ.
//
// Two ways of aligning the receive LFSR with the received bits are built,
// selected by the method input:
//   METHOD1  the receiver rebuilds the transmitter's state from the last four
//            received bits (m1_seed_recovery); the load button copies it into
//            the receive LFSR, which then runs one clock behind the received
//            bits, so it is compared with the received bit delayed by one
//            register.  The slicer uses the ADC sign bit.  Comparison runs
//            from reset, so the error count is non-zero until the load.
//   METHOD2  m2_init_sync first checks a fixed initialization pattern (with
//            retries), then the load button loads the same hard-coded seed
//            into the transmit LFSR and, ext_delay + 2 clocks later, into the
//            receive LFSR; received and local bits are compared directly.
//            The slicer compares the sample with a reference that is
//            trained on every pattern as it arrives (and on ref_train).
// Changing method restarts the Method 2 initialization.
//
// For tests without the optical path, rx_src takes the received bits from a
// digital input pin wired to tx_pin (an external loopback wire) or from
// tx_pin inside the FPGA (ext_delay must then be 0).
//
// Timing: a transmit bit is in dac_a/dac_b and tx_pin one clock later; an
// ADC sample or rx_pin level is a received bit one clock later; the external
// path is ext_delay clocks, so a bit takes ext_delay + 2 clocks end to end.
// The load button is active low and debounced (10 ms by default).  A single
// clock runs both ends; on the board the receive side would be clocked from
// a phase-shifted PLL output, which is outside this RTL.
// The structure follows the document; the single clock, the delay input,
// the min/max reference training and the counter widths are this design's
// choices.
module prbs_bert_top
  import bert_pkg::*;
#(
  parameter lfsr_t       SEED          = DEFAULT_SEED,
  parameter lfsr_t       INIT_PATTERN  = DEFAULT_INIT,
  parameter int unsigned MAX_TRIES     = 4,
  parameter int unsigned DEBOUNCE_CYCLES = 500_000,
  parameter conv_t       DAC_HIGH      = '1,
  parameter conv_t       DAC_LOW       = '0
) (
  input  logic               clk,            // 50 MHz
  input  logic               rst_n,
  input  method_e            method,
  input  rx_src_e            rx_src,         // ADC, digital pin or internal loopback
  input  logic               btn_load_n,     // raw push button, low when pressed
  input  logic [DELAY_W-1:0] ext_delay,      // DAC word / tx_pin to ADC sample / rx_pin, in clocks
  // daughter-board converters
  output conv_t              dac_a,
  output conv_t              dac_b,
  input  conv_t              adc_sample,
  // digital loopback
  output logic               tx_pin,         // transmitted bit, registered
  input  logic               rx_pin,
  // slicer reference
  input  logic               ref_train,
  input  logic               ref_load,
  input  conv_t              ref_in,
  output conv_t              ref_q,
  // results
  output logic               tx_bit,
  output logic               rx_bit,
  output logic               bit_error,      // last compared pair differed
  output logic [ERR_W-1:0]   err_count,
  output logic [BITS_W-1:0]  bit_count,
  output logic               led_no_error,   // LED 3
  output logic               led_error,      // LED 4
  output logic               led_pattern_error,
  output logic               led_no_pattern_error,
  output logic               channel_fail,
  output logic [$clog2(MAX_TRIES+1)-1:0] init_tries,  // failed pattern checks
  // probes
  output logic               btn_level,      // debounced button
  output lfsr_t              tx_state,
  output lfsr_t              rx_state,
  output lfsr_t              rx_reg,
  output lfsr_t              rx_seed_q
);

  localparam int unsigned INTERNAL_DELAY = 2;   // DAC register + slicer register

  // ---------------------------------------------------------------- button
  logic load_press;
  debounce #(.STABLE_CYCLES(DEBOUNCE_CYCLES), .RESET_LEVEL(1'b1)) u_debounce (
    .clk, .rst_n, .btn(btn_load_n), .level(btn_level), .fall(load_press), .rise()
  );

  // --------------------------------------------------------- method change
  method_e method_q;
  logic    m2_start;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) method_q <= method;
    else        method_q <= method;
  end
  assign m2_start = (method != method_q);

  // -------------------------------------------------- Method 2 controller
  logic [DELAY_W-1:0] link_delay;
  logic m2_tx_sel, m2_tx_bit, m2_tx_load, m2_rx_load, m2_check, m2_clear, m2_train;

  assign link_delay = ext_delay + DELAY_W'(INTERNAL_DELAY);

  m2_init_sync #(.INIT_BITS(LFSR_W), .INIT_PATTERN(INIT_PATTERN), .MAX_TRIES(MAX_TRIES)) u_m2 (
    .clk, .rst_n, .start(m2_start), .link_delay, .rx_bit,
    .load_press(load_press && method == METHOD2),
    .tx_sel_init(m2_tx_sel), .tx_init_bit(m2_tx_bit),
    .tx_load(m2_tx_load), .rx_load(m2_rx_load), .check_en(m2_check), .train(m2_train), .clear(m2_clear),
    .led_pattern_error, .led_no_pattern_error, .channel_fail, .tries(init_tries)
  );

  // ----------------------------------------------------------- transmitter
  logic  tx_prbs;
  lfsr_prbs #(.RESET_SEED(SEED)) u_tx_lfsr (
    .clk, .rst_n, .load(method == METHOD2 && m2_tx_load), .seed(SEED), .enable(1'b1),
    .state(tx_state), .prbs(tx_prbs)
  );

  assign tx_bit = (method == METHOD2 && m2_tx_sel) ? m2_tx_bit : tx_prbs;

  dac_mapper #(.CODE_HIGH(DAC_HIGH), .CODE_LOW(DAC_LOW)) u_dac (
    .clk, .rst_n, .bit_in(tx_bit), .dac_a, .dac_b
  );

  // -------------------------------------------------------------- receiver
  logic slicer_bit;
  adc_slicer u_slicer (
    .clk, .rst_n, .method, .sample(adc_sample),
    .train(ref_train || (method == METHOD2 && m2_train)),
    .ref_load, .ref_in, .ref_q, .bit_out(slicer_bit)
  );

  // receive source: the slicer, or a capture flop on the digital pin (or on
  // tx_pin itself); both paths have one register, like the DAC side
  logic rx_pin_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_pin   <= 1'b0;
      rx_pin_q <= 1'b0;
    end else begin
      tx_pin   <= tx_bit;
      rx_pin_q <= (rx_src == RX_INTERNAL) ? tx_pin : rx_pin;
    end
  end
  assign rx_bit = (rx_src == RX_ADC) ? slicer_bit : rx_pin_q;

  lfsr_t rx_seed;
  m1_seed_recovery u_seed (.clk, .rst_n, .rx_bit, .rx_reg, .rx_seed);
  assign rx_seed_q = rx_seed;

  logic  rx_bit_dly;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rx_bit_dly <= 1'b0;
    else        rx_bit_dly <= rx_bit;
  end

  logic  rx_load;
  logic  rx_prbs;
  assign rx_load = (method == METHOD1) ? load_press : m2_rx_load;

  lfsr_prbs #(.RESET_SEED(SEED)) u_rx_lfsr (
    .clk, .rst_n, .load(rx_load), .seed((method == METHOD1) ? rx_seed : SEED),
    .enable(1'b1), .state(rx_state), .prbs(rx_prbs)
  );

  // --------------------------------------------------------------- checker
  logic chk_en, chk_clear, chk_rx;
  assign chk_en    = (method == METHOD1) ? 1'b1 : m2_check;
  assign chk_clear = (method == METHOD1) ? load_press : m2_clear;
  assign chk_rx    = (method == METHOD1) ? rx_bit_dly : rx_bit;

  bert_counter u_counter (
    .clk, .rst_n, .clear(chk_clear || m2_start), .enable(chk_en),
    .rx_bit(chk_rx), .ref_bit(rx_prbs), .mismatch(bit_error),
    .err_count, .bit_count, .led_no_error, .led_error
  );

endmodule
