// Method 2 synchronisation controller.
//
// Before a bit error count the link is checked with a fixed initialization
// pattern.  After start (and after reset) the controller drives the pattern,
// MSB first, onto the transmit line for INIT_BITS clocks (tx_sel_init,
// tx_init_bit).  The receiver shifts in INIT_BITS received bits beginning
// link_delay clocks after the first pattern bit left, and compares them with
// the stored copy of the pattern.  A match lights led_no_pattern_error and
// the controller waits for the load button, while the transmit line carries
// PRBS bits that the receiver ignores.  A mismatch lights led_pattern_error
// and sends the pattern again; after MAX_TRIES failed attempts channel_fail
// is raised and the controller stops until the next start.
// While the pattern's samples arrive (one clock ahead of its bits) train is
// high, so that the slicer reference is set from the pattern's two levels; if
// the old reference made the check fail, the retry uses the new one.
// On a load press (accepted while waiting or while counting) tx_load loads
// the hard-coded seed into the transmit LFSR in that cycle, and rx_load loads
// the same seed into the receive LFSR link_delay clocks later, so that both
// produce the same bit in the cycle it arrives.  check_en is high from the
// next clock on; the checker compares received and local bits directly.
// The pattern check, the retries, the LEDs, the independent seed loads and
// setting the reference from the pattern follow the document; delaying the receiver load by the link delay and
// the pattern, retry limit and capture window timing are this design's
// choices (the document loads both at once, i.e. link_delay = 0).
module m2_init_sync
  import bert_pkg::*;
#(
  parameter int unsigned INIT_BITS = LFSR_W,
  parameter logic [INIT_BITS-1:0] INIT_PATTERN = DEFAULT_INIT,
  parameter int unsigned MAX_TRIES = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,        // restart the initialization
  input  logic [DELAY_W-1:0] link_delay,   // clocks from transmit bit to received bit
  input  logic               rx_bit,
  input  logic               load_press,   // one-cycle pulse from the load button
  output logic               tx_sel_init,  // transmit line carries tx_init_bit
  output logic               tx_init_bit,
  output logic               tx_load,
  output logic               rx_load,
  output logic               check_en,
  output logic               train,        // the ADC samples of the pattern are arriving
  output logic               clear,        // clear the error counters
  output logic               led_pattern_error,
  output logic               led_no_pattern_error,
  output logic               channel_fail,
  output logic [$clog2(MAX_TRIES+1)-1:0] tries   // failed attempts so far
);

  typedef enum logic [2:0] {
    S_INIT,       // sending and receiving the pattern
    S_READY,      // pattern received correctly, waiting for load
    S_ALIGN,      // transmit LFSR loaded, waiting to load the receive LFSR
    S_RUN,        // counting bit errors
    S_FAIL        // too many failed attempts
  } state_e;

  localparam int unsigned CNT_W = DELAY_W + 2;

  state_e                 state;
  logic [CNT_W-1:0]       cnt;
  logic [INIT_BITS-1:0]   rx_shift;
  logic [CNT_W-1:0]       dly;
  logic                   press_ok;

  assign dly         = CNT_W'(link_delay);
  assign tx_sel_init = (state == S_INIT) && (cnt < CNT_W'(INIT_BITS));
  int unsigned bit_idx;
  assign bit_idx     = INIT_BITS - 1 - (32'(cnt) % INIT_BITS);
  assign tx_init_bit = INIT_PATTERN[bit_idx];
  assign press_ok    = load_press && (state == S_READY || state == S_RUN);
  assign tx_load     = press_ok;
  assign clear       = press_ok;
  assign rx_load     = (press_ok && link_delay == '0) ||
                       (state == S_ALIGN && cnt == dly - 1'b1);
  assign check_en    = (state == S_RUN);
  // The slicer sees each ADC sample one clock before the bit it yields.
  assign train       = (state == S_INIT) && (cnt + 1'b1 >= dly) &&
                       (cnt + 1'b1 < dly + CNT_W'(INIT_BITS));
  assign channel_fail = (state == S_FAIL);

  // The line carries PRBS bits, not the pattern, whenever LFSRs are loaded
  // or bits are compared; the receive load never precedes the transmit load.
  a_load_not_in_init:  assert property (@(posedge clk) disable iff (!rst_n)
                                        (tx_load || rx_load || check_en) |-> !tx_sel_init);
  a_rx_after_tx:       assert property (@(posedge clk) disable iff (!rst_n)
                                        rx_load |-> (tx_load || state == S_ALIGN));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_INIT;
      cnt      <= '0;
      rx_shift <= '0;
      tries    <= '0;
      led_pattern_error    <= 1'b0;
      led_no_pattern_error <= 1'b0;
    end else if (start) begin
      state    <= S_INIT;
      cnt      <= '0;
      tries    <= '0;
      led_pattern_error    <= 1'b0;
      led_no_pattern_error <= 1'b0;
    end else begin
      unique case (state)
        S_INIT: begin
          cnt <= cnt + 1'b1;
          if (cnt >= dly && cnt < dly + CNT_W'(INIT_BITS))
            rx_shift <= {rx_shift[INIT_BITS-2:0], rx_bit};
          if (cnt == dly + CNT_W'(INIT_BITS)) begin
            cnt <= '0;
            if (rx_shift == INIT_PATTERN) begin
              state <= S_READY;
              led_pattern_error    <= 1'b0;
              led_no_pattern_error <= 1'b1;
            end else begin
              led_pattern_error    <= 1'b1;
              led_no_pattern_error <= 1'b0;
              tries <= tries + 1'b1;
              if (32'(tries) + 1 >= MAX_TRIES) state <= S_FAIL;
            end
          end
        end
        S_READY, S_RUN: begin
          if (press_ok) begin
            cnt   <= '0;
            state <= (link_delay == '0) ? S_RUN : S_ALIGN;
          end
        end
        S_ALIGN: begin
          cnt <= cnt + 1'b1;
          if (rx_load) state <= S_RUN;
        end
        S_FAIL: ;
        default: state <= S_INIT;
      endcase
    end
  end

endmodule
