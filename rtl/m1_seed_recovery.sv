// Method 1 receiver seed recovery.
//
// The received bit stream is the transmitter LFSR's MSB.  Shifting it into a
// 4-bit register (rx_reg, newest bit in the LSB) rebuilds, after four clocks,
// the transmitter state of four clocks earlier, because in a Fibonacci LFSR
// the MSB sequence is the state read out one bit at a time.  Four LFSR steps
// applied to that value give the state the transmitter holds now; this is
// the receiver seed (rx_seed), reloaded on every clock.  It is computed from
// the shift register's next value, so that rx_seed(t) is the transmitter
// state whose MSB is the bit arriving at t (S(t - D) for a link of D
// clocks); loading it into the receiver LFSR puts that LFSR exactly one clock
// behind the received bits.
// From the fifth clock after the bits start, rx_seed is valid.  The shift
// register and the four-step function follow the document (its Table 1 row
// 4); deriving the seed from the next rather than the current shift-register
// value is this design's reading of "the same state as the transmitter".
module m1_seed_recovery
  import bert_pkg::*;
#(
  parameter lfsr_t TAPS = LFSR_TAPS
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  rx_bit,    // received PRBS bit
  output lfsr_t rx_reg,    // last four received bits, newest in bit 0
  output lfsr_t rx_seed    // four-step advance of rx_reg
);

  lfsr_t rx_reg_d;
  assign rx_reg_d = {rx_reg[LFSR_W-2:0], rx_bit};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_reg  <= '0;
      rx_seed <= '0;
    end else begin
      rx_reg  <= rx_reg_d;
      rx_seed <= lfsr_advance(rx_reg_d, LFSR_W, TAPS);
    end
  end

endmodule
