// Behavioural model of the analog part of the link, for simulation only:
// DAC, electrical amplifiers, Mach-Zehnder modulator, fibre, photodiode and
// ADC reduced to a delay and a two-level signal.
//
// A DAC word at or above mid-scale is taken as a transmitted '1'.  The ADC
// sample is hi_level (for '1') or lo_level (for '0') plus a small random
// ripple of up to RIPPLE codes, delayed by `delay` clocks: for delay = 0 the
// sample follows the DAC word in the same clock.  While `flip` is high the
// sample shows the opposite level, which is how the testbench injects a bit
// error.  Levels, delay and flip may change at run time.
module link_model
  import bert_pkg::*;
#(
  parameter int unsigned MAX_DELAY = 64,
  parameter int unsigned RIPPLE    = 32
) (
  input  logic               clk,
  input  conv_t              dac_word,
  input  logic [DELAY_W-1:0] delay,
  input  conv_t              hi_level,
  input  conv_t              lo_level,
  input  logic               flip,
  output conv_t              adc_sample
);

  logic hist [MAX_DELAY];
  logic tx_level, rx_level;
  conv_t ripple;

  assign tx_level = dac_word[CONV_W-1];

  always @(posedge clk) begin
    for (int i = MAX_DELAY - 1; i > 0; i--) hist[i] <= hist[i-1];
    hist[0] <= tx_level;
    ripple  <= conv_t'($urandom % RIPPLE);
  end

  assign rx_level   = ((delay == '0) ? tx_level : hist[delay - 1'b1]) ^ flip;
  assign adc_sample = (rx_level ? hi_level : lo_level) + ripple;

endmodule
