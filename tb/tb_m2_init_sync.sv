// Self-checking testbench of m2_init_sync.
// A model link delays the transmit line by D clocks and can corrupt the
// initialization bits of chosen attempts.  Checked: the pattern appears on
// the line MSB first; a clean link gives led_no_pattern_error after one
// attempt; corrupted attempts are retried and counted; MAX_TRIES failures
// raise channel_fail; on a load press tx_load comes in that cycle and
// rx_load exactly D clocks later, with check_en from the clock after.
module tb_m2_init_sync;
  import bert_pkg::*;
  localparam logic [3:0] PAT = 4'b1011;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, load_press = 1'b0;
  logic [DELAY_W-1:0] link_delay = '0;
  logic rx_bit;
  logic tx_sel_init, tx_init_bit, tx_load, rx_load, check_en, clear, train;
  logic led_pattern_error, led_no_pattern_error, channel_fail;
  logic [2:0] tries;
  int checks = 0, failures = 0;

  m2_init_sync #(.INIT_BITS(4), .INIT_PATTERN(PAT), .MAX_TRIES(4)) dut (.*);

  always #5 clk = ~clk;

  // link model: D-clock delay line, optional corruption of pattern bits
  logic line;
  logic [63:0] pipe = '0;
  int corrupt_attempts = 0;    // attempts still to be corrupted
  int attempt_bits = 0;
  assign line   = tx_sel_init ? tx_init_bit : 1'($urandom);
  assign rx_bit = (link_delay == 0) ? line : pipe[link_delay-1];
  always @(posedge clk) begin
    logic l;
    l = line;
    if (tx_sel_init) begin
      if (corrupt_attempts > 0 && attempt_bits == 2) l = ~l;
      attempt_bits++;
      if (attempt_bits == 4) begin
        attempt_bits = 0;
        if (corrupt_attempts > 0) corrupt_attempts--;
      end
    end
    pipe <= {pipe[62:0], l};
  end

  // observe the transmitted pattern bits
  logic [3:0] seen_pat;
  int seen_n = 0;
  always @(posedge clk) if (rst_n && tx_sel_init) begin
    seen_pat <= {seen_pat[2:0], tx_init_bit};
    seen_n++;
  end

  // train window, in clocks after the first pattern bit
  int since_first = -1, train_first = -1, train_n = 0;
  always @(posedge clk) if (rst_n) begin
    if (tx_sel_init && tx_init_bit == PAT[3] && since_first < 0) since_first = 0;
    else if (since_first >= 0) since_first++;
    if (train) begin
      if (train_first < 0) train_first = since_first;
      train_n++;
    end
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic wait_done(output int cycles);
    cycles = 0;
    while (!led_no_pattern_error && !channel_fail && cycles < 2000) begin
      @(negedge clk); cycles++;
    end
  endtask

  task automatic restart(int d, int bad);
    link_delay = DELAY_W'(d);
    corrupt_attempts = bad;
    since_first = -1; train_first = -1; train_n = 0;
    attempt_bits = 0;
    start = 1'b1; @(negedge clk); start = 1'b0;
  endtask

  task automatic press_and_time(int d);
    int t;
    load_press = 1'b1;
    #1;
    checks++; if (!tx_load || !clear) begin failures++; $display("FAIL tx_load/clear not with press"); end
    if (d == 0) begin
      checks++; if (!rx_load) begin failures++; $display("FAIL rx_load not with press at D=0"); end
    end
    @(negedge clk); load_press = 1'b0;
    t = 1;
    if (d > 0) begin
      while (!rx_load && t < 200) begin @(negedge clk); t++; end
      check($sformatf("rx_load delay D=%0d", d), t, d);
      @(negedge clk);
    end
    check("check_en after rx_load", check_en, 1);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // reset starts an attempt on a zero-delay link
    wait_done(c);
    check("D=0 pattern ok", led_no_pattern_error, 1);
    check("D=0 tries", tries, 0);
    check("pattern on the line", seen_pat, PAT);
    check("pattern length", seen_n, 4);
    check("no check before load", check_en, 0);
    press_and_time(0);
    // clean links with delays 1, 5 and 9
    for (int d = 1; d <= 9; d += 4) begin
      restart(d, 0);
      wait_done(c);
      check($sformatf("D=%0d pattern ok", d), led_no_pattern_error, 1);
      check($sformatf("D=%0d no error led", d), led_pattern_error, 0);
      check($sformatf("D=%0d train starts a clock before the pattern bits", d), train_first, d - 1);
      check($sformatf("D=%0d train length", d), train_n, 4);
      repeat (5) @(negedge clk);
      press_and_time(d);
      // a second press while counting restarts the alignment
      repeat (7) @(negedge clk);
      press_and_time(d);
    end
    // two corrupted attempts, then success
    restart(3, 2);
    repeat (3 + 4 + 2) @(negedge clk);
    check("error led after bad attempt", led_pattern_error, 1);
    wait_done(c);
    check("retry success", led_no_pattern_error, 1);
    check("retry count", tries, 2);
    // always corrupted: channel failure after 4 attempts
    restart(2, 100);
    wait_done(c);
    check("channel fail", channel_fail, 1);
    check("fail tries", tries, 4);
    load_press = 1'b1;
    #1;
    checks++; if (tx_load) begin failures++; $display("FAIL load accepted after failure"); end
    @(negedge clk); load_press = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
