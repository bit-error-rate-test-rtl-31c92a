// ADC slicer: one received bit from a 14-bit ADC sample.
//
// Method 1 takes the sign bit of the sample: the MSB of the offset-binary
// word, 1 above mid-scale and 0 below.  Method 2 compares the sample with a
// 14-bit reference and outputs 1 when the sample is greater.  The reference
// resets to REF_DEFAULT (mid-scale) and can be trained from the
// initialization bits: while train is high the slicer tracks the smallest
// and largest sample, and on the cycle train falls the reference becomes
// their mean.  ref_load instead copies ref_in into the reference.  The
// output bit is registered: one clock from sample to bit.
// Sign-bit slicing, reference comparison and setting the reference from the
// initialization bits follow the document; min/max training, ref_load and
// the offset-binary sample format are this design's choices.
module adc_slicer
  import bert_pkg::*;
#(
  parameter conv_t REF_DEFAULT = conv_t'(1) << (CONV_W - 1)
) (
  input  logic    clk,
  input  logic    rst_n,
  input  method_e method,
  input  conv_t   sample,    // ADC word, offset binary
  input  logic    train,     // track min/max while high
  input  logic    ref_load,  // take ref_in as the reference
  input  conv_t   ref_in,
  output conv_t   ref_q,     // reference in use
  output logic    bit_out    // sliced bit, registered
);

  conv_t smin, smax;
  logic  train_q;
  logic [CONV_W:0] sum;

  assign sum = {1'b0, smin} + {1'b0, smax};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_q   <= REF_DEFAULT;
      smin    <= '1;
      smax    <= '0;
      train_q <= 1'b0;
      bit_out <= 1'b0;
    end else begin
      train_q <= train;
      if (train) begin
        if (!train_q) begin            // first training sample
          smin <= sample;
          smax <= sample;
        end else begin
          if (sample < smin) smin <= sample;
          if (sample > smax) smax <= sample;
        end
      end
      if (ref_load)              ref_q <= ref_in;
      else if (train_q && !train) ref_q <= sum[CONV_W:1];
      bit_out <= (method == METHOD1) ? sample[CONV_W-1] : (sample > ref_q);
    end
  end

endmodule
