// basic_cpu_board_tb: runs the prime-number program on the plain computer
// board and reads the results the way a person would, off the 7-segment
// display.
//
// The RAM image tb/prime_fast.hex is the prime program with both delay
// counts (Jdelay at 0x6f, Kdelay at 0x70) set to 1, so a prime follows
// within some ten thousand clocks. The testbench decodes the multiplexed
// segments with its own table (seg_reader). A 4-digit value counts as shown
// once it has stayed the same for a whole scan, and the shown values must be
// the primes in order as BCD digits. The primes are computed here by trial division.
//   1. After a btn[1] reset: the first prime 0002 must appear within 300
//      clocks, then the next 29 primes in order.
//   2. sw[0] up: PC (LEDs) and the display must freeze for 3000 clocks;
//      counting resumes where it stopped when sw[0] goes down.
//   3. btn[1] held: PC reads 0 on the LEDs; after release the display
//      restarts from 0002.
// Each mechanism must happen at least once. The watchdog bounds the run.
module basic_cpu_board_tb;
  localparam int SB = 2;            // 4 clocks per digit, 16 per scan
  localparam int SCAN = 4 << SB;

  logic clock = 0;
  logic [3:0] btn = 0;
  logic [7:0] sw = 0;
  logic [7:0] led;
  logic [6:0] seg;
  logic dp;
  logic [3:0] an;

  int checks = 0, failures = 0;
  int n_primes = 0, n_pauses = 0, n_resets = 0;
  longint cycle = 0;

  basic_cpu_board #(.INIT_FILE("tb/prime_fast.hex"), .SCAN_BITS(SB)) dut (.*);
  always #5 clock = ~clock;
  always @(posedge clock) cycle <= cycle + 1;

  logic [15:0] shown_value;  // last value stable for a whole scan
  logic bad_digit;
  seg_reader #(.SCAN_CLOCKS(SCAN)) reader (.clock, .seg, .an, .value(shown_value), .bad(bad_digit));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL t=%0t %s (shown=%h led=%h)", $time, what, shown_value, led);
    end
  endtask

  // wait for the shown value to change, up to 'limit' clocks
  task automatic wait_shown(input int limit, output bit changed);
    logic [15:0] v = shown_value;
    changed = 0;
    for (int t = 0; t < limit; t++) begin
      @(negedge clock);
      if (shown_value != v) begin changed = 1; break; end
    end
  endtask

  // -------------------------------------------------------- primes
  function automatic bit is_prime(input int n);
    if (n < 2) return 0;
    for (int d = 2; d * d <= n; d++) if (n % d == 0) return 0;
    return 1;
  endfunction

  function automatic logic [15:0] bcd(input int n);
    return {4'(n / 1000), 4'((n / 100) % 10), 4'((n / 10) % 10), 4'(n % 10)};
  endfunction

  function automatic int next_prime(input int p);
    int q = p + 1;
    while (!is_prime(q)) q++;
    return q;
  endfunction

  // -------------------------------------------------------- stimulus
  initial begin
    bit ch;
    int p;
    longint t0;
    logic [7:0] led_frozen;
    logic [15:0] shown_frozen;

    // 1. reset, then the first 30 primes
    btn[1] = 1; repeat (3) @(negedge clock);
    check(led == 8'h00, "PC reads 0 while btn[1] is held");
    btn[1] = 0; t0 = cycle;
    // the OUT register is cleared by reset: 0000 shows first
    wait_shown(100, ch);
    check(ch && shown_value == 16'h0000, "display reads 0000 after reset");
    wait_shown(300, ch);
    check(ch && shown_value == 16'h0002, "first prime 0002 shown");
    $display("first prime shown %0d clocks after reset", cycle - t0);
    p = 2; n_primes++;
    for (int n = 1; n < 30; n++) begin
      p = next_prime(p);
      wait_shown(200_000, ch);
      check(ch && shown_value == bcd(p), $sformatf("prime %0d shown", p));
      if (ch) n_primes++;
    end

    // 2. pause with sw[0]
    sw[0] = 1;
    repeat (2) @(negedge clock);
    led_frozen = led; shown_frozen = shown_value;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clock);
      if (led != led_frozen || shown_value != shown_frozen) break;
      if (t == 2999) n_pauses++;
    end
    check(n_pauses == 1, "sw[0] up should freeze PC and display");
    sw[0] = 0;
    p = next_prime(p);
    wait_shown(200_000, ch);
    check(ch && shown_value == bcd(p), $sformatf("after the pause, prime %0d shown", p));

    // 3. reset in mid-run
    btn[1] = 1; repeat (3) @(negedge clock);
    check(led == 8'h00, "PC reads 0 while btn[1] is held");
    btn[1] = 0;
    wait_shown(100, ch);
    check(ch && shown_value == 16'h0000, "display cleared by reset");
    wait_shown(300, ch);
    check(ch && shown_value == 16'h0002, "restart from 0002 after reset");
    if (ch && shown_value == 16'h0002) n_resets++;
    p = next_prime(2);
    wait_shown(200_000, ch);
    check(ch && shown_value == bcd(p), "0003 follows the restart");

    check(!bad_digit, "every scan step lit exactly one valid digit");
    $display("mechanisms: primes=%0d pauses=%0d resets=%0d", n_primes, n_pauses, n_resets);
    check(n_primes > 0, "no prime was shown");
    check(n_pauses > 0, "the pause never happened");
    check(n_resets > 0, "the reset restart never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5_000_000) @(posedge clock);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
