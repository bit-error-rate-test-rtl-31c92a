// PRBS generator: a Fibonacci linear feedback shift register.
//
// Each enabled clock the state shifts one place towards the MSB and the LSB
// takes the xor of the tapped bits; with the default taps (q[3], q[2]) a
// non-zero seed walks through all 15 non-zero states, e.g. F E C 8 1 2 4 9
// 3 6 D A 5 B 7 from seed 4'hF.  prbs is the MSB of the current state,
// combinationally (no extra register).
// load has priority over enable and copies seed into the register on the
// next rising edge.  Reset also loads the seed, so the generator runs from
// power-up as the document's transmitter does.  Shift direction, taps and
// output bit follow the document's register figure and state tables; the
// synchronous reset-to-seed is this design's choice.
module lfsr_prbs
  import bert_pkg::*;
#(
  parameter int unsigned W     = LFSR_W,
  parameter logic [W-1:0] TAPS = LFSR_TAPS,
  parameter logic [W-1:0] RESET_SEED = DEFAULT_SEED
) (
  input  logic         clk,
  input  logic         rst_n,   // asynchronous, active low: state = RESET_SEED
  input  logic         load,    // copy seed into the register
  input  logic [W-1:0] seed,
  input  logic         enable,  // advance one step
  output logic [W-1:0] state,
  output logic         prbs     // MSB of the state
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      state <= RESET_SEED;
    else if (load)   state <= seed;
    else if (enable) state <= {state[W-2:0], ^(state & TAPS)};
  end

  assign prbs = state[W-1];

  // A non-zero state never steps into the all-zero lock-up state.
  a_no_lockup: assert property (@(posedge clk) disable iff (!rst_n)
                                (!load && state != '0) |=> state != '0);

endmodule
