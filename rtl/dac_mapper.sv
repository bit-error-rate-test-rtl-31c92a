// PRBS-to-DAC mapper.
//
// The transmitter produces one bit per clock; the daughter-board DAC takes a
// 14-bit word on each of its two channels (A and B).  A '1' becomes CODE_HIGH
// and a '0' CODE_LOW, the codes of the largest and smallest voltage the
// driver amplifier accepts, and the same word is sent on both channels so
// that all 14 data lines of a channel follow the PRBS bit.  The words are
// registered and change on every rising clock edge, one clock after the bit.
// The mapping follows the document; the default codes (full scale, offset
// binary) and the output register are this design's choices, to be set to
// the limits of the amplifier in use.
module dac_mapper
  import bert_pkg::*;
#(
  parameter conv_t CODE_HIGH = '1,
  parameter conv_t CODE_LOW  = '0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  bit_in,    // PRBS bit to send
  output conv_t dac_a,     // DAC channel A data
  output conv_t dac_b      // DAC channel B data
);

  conv_t code;
  assign code = bit_in ? CODE_HIGH : CODE_LOW;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dac_a <= CODE_LOW;
      dac_b <= CODE_LOW;
    end else begin
      dac_a <= code;
      dac_b <= code;
    end
  end

endmodule
