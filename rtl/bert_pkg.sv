// Shared types, constants and functions of the PRBS generator / bit error
// rate tester.
//
// The PRBS is a 4-bit Fibonacci LFSR that shifts towards the MSB and feeds
// q[3] ^ q[2] back into q[0] (x^4 + x^3 + 1, period 15).  The MSB is the
// transmitted bit.  lfsr_next() gives one step of that register and
// lfsr_advance() several; the Method 1 receiver uses a four-step advance to
// turn four received bits into the state the transmitter has reached.
// The converter width (14 bits) and the 50 MHz clock follow the document;
// the seed, the initialization pattern and the counter widths are this
// design's choices.
package bert_pkg;

  localparam int unsigned LFSR_W   = 4;          // register length
  localparam int unsigned CONV_W   = 14;         // DAC and ADC resolution
  localparam int unsigned ERR_W    = 32;         // bit-error counter width
  localparam int unsigned BITS_W   = 48;         // compared-bit counter width
  localparam int unsigned DELAY_W  = 16;         // link delay, in clock cycles

  typedef logic [LFSR_W-1:0] lfsr_t;
  typedef logic [CONV_W-1:0] conv_t;

  // Feedback taps as a mask over the state: q[3] xor q[2].
  localparam lfsr_t LFSR_TAPS = 4'b1100;
  // Default seed and initialization pattern.
  localparam lfsr_t DEFAULT_SEED = 4'b1100;
  localparam lfsr_t DEFAULT_INIT = 4'b1010;

  // Which receiver synchronisation scheme is in use.
  typedef enum logic {
    METHOD1 = 1'b0,   // receiver seed recovered from the received bits
    METHOD2 = 1'b1    // initialization bits, then hard-coded seed in both LFSRs
  } method_e;

  // Where the receiver takes its bits from.
  typedef enum logic [1:0] {
    RX_ADC      = 2'd0,   // ADC sample through the slicer (the optical link)
    RX_PIN      = 2'd1,   // a digital input pin wired to tx_pin
    RX_INTERNAL = 2'd2    // tx_pin looped back inside the FPGA
  } rx_src_e;

  // One step: shift towards the MSB, new LSB = xor of the tapped bits.
  function automatic lfsr_t lfsr_next(lfsr_t q, lfsr_t taps = LFSR_TAPS);
    return {q[LFSR_W-2:0], ^(q & taps)};
  endfunction

  // n steps of lfsr_next.
  function automatic lfsr_t lfsr_advance(lfsr_t q, int unsigned n, lfsr_t taps = LFSR_TAPS);
    lfsr_t s = q;
    for (int unsigned i = 0; i < n; i++) s = lfsr_next(s, taps);
    return s;
  endfunction

endpackage
