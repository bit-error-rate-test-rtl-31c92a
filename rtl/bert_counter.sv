// Bit error counter.
//
// On each clock with enable high the received bit is compared with the
// locally generated PRBS bit by an xor; a mismatch adds one to err_count.
// bit_count counts the compared bits, so err_count / bit_count is the bit
// error rate.  clear zeroes both counters (it wins over enable).  Both
// counters stop at their largest value instead of wrapping.  led_no_error
// is lit while err_count is zero and led_error while it is not, as on the
// board's LED 3 and LED 4.  Counters and LEDs change one clock after the
// compared bits.  The xor comparison, the error counter and the two LEDs
// follow the document; the compared-bit counter, the widths and saturation
// are this design's choices.
module bert_counter
  import bert_pkg::*;
#(
  parameter int unsigned EW = ERR_W,
  parameter int unsigned BW = BITS_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          enable,
  input  logic          rx_bit,      // received bit
  input  logic          ref_bit,     // locally generated bit
  output logic          mismatch,    // registered xor of the last compared pair
  output logic [EW-1:0] err_count,
  output logic [BW-1:0] bit_count,
  output logic          led_no_error,
  output logic          led_error
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err_count <= '0;
      bit_count <= '0;
      mismatch  <= 1'b0;
    end else if (clear) begin
      err_count <= '0;
      bit_count <= '0;
      mismatch  <= 1'b0;
    end else if (enable) begin
      mismatch <= rx_bit ^ ref_bit;
      if ((rx_bit ^ ref_bit) && !(&err_count)) err_count <= err_count + 1'b1;
      if (!(&bit_count))                       bit_count <= bit_count + 1'b1;
    end else begin
      mismatch <= 1'b0;
    end
  end

  // Never more errors than compared bits.
  a_err_le_bits: assert property (@(posedge clk) disable iff (!rst_n)
                                   BW'(err_count) <= bit_count);

  assign led_no_error = (err_count == '0);
  assign led_error    = !led_no_error;

endmodule
