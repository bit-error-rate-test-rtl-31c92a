// Push-button debouncer.
//
// The raw button level is clocked into a first flip-flop (sync).  A counter
// runs while sync has held the same level as on the previous clock and is
// cleared whenever it changes.  When the counter has seen STABLE_CYCLES
// equal samples in a row, the second flip-flop (level) takes the button
// level; a bounce shorter than that never reaches the output.  With the
// default 500 000 cycles this is 10 ms at the 50 MHz board clock, the figure
// the document gives.  The extra flip-flop sync_q (used to detect a change of
// the first stage) and the one-cycle press/release pulses are this design's
// additions.  Latency from a clean edge on btn to level: STABLE_CYCLES + 2
// clocks.
module debounce #(
  parameter int unsigned STABLE_CYCLES = 500_000,
  parameter bit          RESET_LEVEL   = 1'b1     // idle level of the button
) (
  input  logic clk,
  input  logic rst_n,
  input  logic btn,       // raw, asynchronous button level
  output logic level,     // debounced level
  output logic fall,      // one-cycle pulse: level went 1 -> 0
  output logic rise       // one-cycle pulse: level went 0 -> 1
);

  localparam int unsigned CW = $clog2(STABLE_CYCLES + 1);

  logic          sync, sync_q;
  logic [CW-1:0] cnt;
  logic          level_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync    <= RESET_LEVEL;
      sync_q  <= RESET_LEVEL;
      cnt     <= '0;
      level   <= RESET_LEVEL;
      level_q <= RESET_LEVEL;
    end else begin
      sync    <= btn;
      sync_q  <= sync;
      level_q <= level;
      if (sync != sync_q) begin
        cnt <= '0;
      end else if (cnt == CW'(STABLE_CYCLES - 1)) begin
        level <= sync_q;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  assign fall = level_q & ~level;
  assign rise = ~level_q & level;

endmodule
