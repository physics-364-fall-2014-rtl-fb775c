// lab27_top_tb: end-to-end test of all four designs at their default sizes
// (1000 clocks per millisecond, full delay constants in the program). One
// clock drives all four; for the music machines a clock is 1 us.
//
// Plain computer: after a btn[1] reset it is paused with sw[0] for 5000
// clocks; the first prime, 0002, read off the 7-segment display, must then
// appear after the same delay as below plus the 5000 paused clocks (and at
// most two display scans), and the LEDs (PC) must not move while paused.
// Computer: after power-on the prime program must show 0002 once it has run
// its display delay, 4096 x 768 passes of the inner loop; the clock count
// to the first OUT is checked against the instruction timing (3 clocks per
// instruction, 4 per STORE): 7 + 4096 * (20 + 13 * 768) clocks of delay
// plus at most 1000 clocks of computation. Then the delay constants are
// cut to 1 through MEMORY mode and the next primes must follow in order;
// BREAK mode must hold a prime until btn[0].
// Music (single voice): meanwhile the whole of the first tune plays, each
// note at its pitch and length, with the gaps, the closing rest and the
// GOTO back to its start. Duet: both voices play the tune's first notes;
// then btn[1] with the switches at 64 starts the pips on both pins.
// Each mechanism (tone, rest, gap, GOTO, go-to button, OUT, saturating
// prime loop, MEMORY write, BREAK hold) is counted and must occur.
module lab27_top_tb;
  logic clock = 0;
  logic [3:0] p1_btn = 4'b0001, p2_btn = 4'b0001, c_btn = 0;
  logic [7:0] p1_sw = 0, p2_sw = 0, c_sw = 0;
  logic c_por = 1;
  logic [7:0] p1_led, c_led;
  logic [4:1] p1_jc, p1_jd, p2_jc, p2_jd;
  logic [6:0] p1_seg, p2_seg, c_seg;
  logic p1_dp, p2_dp, c_dp;
  logic [3:0] p1_an, p2_an, c_an;
  logic [15:0] c_display_value;
  logic [3:0] b_btn = 4'b0010;
  logic [7:0] b_sw = 0, b_led;
  logic [6:0] b_seg;
  logic b_dp;
  logic [3:0] b_an;

  lab27_top dut (
    .p1_clock(clock), .p1_btn, .p1_sw, .p1_led, .p1_jc, .p1_jd, .p1_seg, .p1_dp, .p1_an,
    .p2_clock(clock), .p2_btn, .p2_sw, .p2_jc, .p2_jd, .p2_seg, .p2_dp, .p2_an,
    .b_clock(clock), .b_btn, .b_sw, .b_led, .b_seg, .b_dp, .b_an,
    .c_clock(clock), .c_por, .c_btn, .c_sw, .c_led, .c_seg, .c_dp, .c_an, .c_display_value
  );
  always #5 clock = ~clock;

  int checks = 0, failures = 0;
  int n_tone = 0, n_rest = 0, n_goto = 0, n_gap = 0, n_gobtn = 0, n_duet = 0;
  int n_prime = 0, n_memwr = 0, n_hold = 0, n_bprime = 0, n_bpause = 0;
  bit cpu_done = 0, music_done = 0, duet_done = 0, basic_done = 0;
  longint cyc = 0;
  always @(posedge clock) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL t=%0t cyc=%0d %s", $time, cyc, what); end
  endtask

  task automatic press(ref logic [3:0] b, input int i);
    b[i] = 1; repeat (4) @(negedge clock);
    b[i] = 0; repeat (4) @(negedge clock);
  endtask

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (60_000_000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ computer
  function automatic bit is_prime(input int n);
    if (n < 2) return 0;
    for (int d = 2; d * d <= n; d++) if (n % d == 0) return 0;
    return 1;
  endfunction
  function automatic logic [15:0] bcd(input int n);
    return {4'(n / 1000), 4'((n / 100) % 10), 4'((n / 10) % 10), 4'(n % 10)};
  endfunction

  task automatic wait_change(input longint limit, output bit changed);
    logic [15:0] v = c_display_value;
    changed = 0;
    for (longint t = 0; t < limit; t++) begin
      @(negedge clock);
      if (c_display_value != v) begin changed = 1; break; end
    end
  endtask

  task automatic write_word(input logic [7:0] addr, input logic [15:0] w);
    c_sw = addr; press(c_btn, 0);
    c_sw = w[7:0]; press(c_btn, 1);
    c_sw = w[15:8]; press(c_btn, 2);
    c_sw = 0;
    check(c_display_value == w && c_led == addr, "MEMORY: word written and shown");
    n_memwr++;
  endtask

  initial begin
    bit ch;
    longint t0, lo, hi;
    int p;
    repeat (4) @(negedge clock);
    c_por = 0;
    t0 = cyc;
    lo = 7 + 4096 * (20 + 13 * 768);
    hi = lo + 1000;
    wait_change(hi + 100, ch);
    check(ch && c_display_value == 16'h0002, "first prime 0002 shown");
    check(cyc - t0 >= lo && cyc - t0 <= hi, $sformatf("first prime after %0d clocks, expected %0d..%0d", cyc - t0, lo, hi));
    $display("first prime after %0d clocks", cyc - t0);
    n_prime++;
    // MEMORY mode: shorten the delay
    press(c_btn, 3); press(c_btn, 3); press(c_btn, 3);
    write_word(8'h6f, 16'h0001);
    write_word(8'h70, 16'h0001);
    press(c_btn, 3);                       // back to RUN
    p = 2;
    for (int k = 0; k < 8; k++) begin
      p++; while (!is_prime(p)) p++;
      wait_change(500000, ch);
      check(ch && c_display_value == bcd(p), $sformatf("prime %0d shown", p));
      n_prime++;
    end
    press(c_btn, 3);                       // BREAK
    p++; while (!is_prime(p)) p++;
    wait_change(500000, ch);
    check(c_display_value == bcd(p), $sformatf("prime %0d shown in BREAK mode", p));
    wait_change(20000, ch);
    check(!ch, "BREAK mode holds the prime");
    n_hold++;
    press(c_btn, 0);
    p++; while (!is_prime(p)) p++;
    wait_change(500000, ch);
    check(c_display_value == bcd(p), "released by btn[0]: next prime");
    cpu_done = 1;
  end

  // ------------------------------------------------------------ plain computer
  logic [15:0] b_shown;
  logic b_bad;
  seg_reader #(.SCAN_CLOCKS(4096)) b_reader (.clock, .seg(b_seg), .an(b_an), .value(b_shown), .bad(b_bad));

  initial begin
    longint t0, lo, hi;
    logic [7:0] pc_frozen;
    bit moved;
    moved = 0;
    repeat (4) @(negedge clock);
    b_btn = 0;
    t0 = cyc;
    repeat (10_000) @(negedge clock);  // two display scans: 0000 is read
    b_sw[0] = 1;
    @(negedge clock);
    pc_frozen = b_led;
    repeat (5000) begin
      @(negedge clock);
      if (b_led != pc_frozen) moved = 1;
    end
    b_sw[0] = 0;
    check(!moved, "plain computer: PC frozen while sw[0] is up");
    if (!moved) n_bpause++;
    check(b_shown == 16'h0000, "plain computer: display reads 0000 after reset");
    lo = 7 + 4096 * (20 + 13 * 768) + 5001;
    hi = lo + 1000 + 2 * 4096;
    wait (b_shown != 16'h0000 || cyc - t0 > hi + 100);
    check(b_shown == 16'h0002, "plain computer: first prime 0002 shown");
    check(cyc - t0 >= lo && cyc - t0 <= hi,
          $sformatf("plain computer: first prime after %0d clocks, expected %0d..%0d", cyc - t0, lo, hi));
    $display("plain computer: first prime read after %0d clocks", cyc - t0);
    if (b_shown == 16'h0002) n_bprime++;
    check(!b_bad, "plain computer: display scan lights one valid digit at a time");
    basic_done = 1;
  end

  // ------------------------------------------------------------ single voice
  logic d1, u1; int l1, n1, r1, g1;
  tone_meter #(.GAP_CLOCKS(20_000)) m1 (.clock, .pin(p1_jc[1]), .note_done(d1),
    .note_high_len(l1), .note_highs(n1), .uneven(u1), .low_run(r1), .gap_before(g1));

  int mary_hp[13]  = '{1517, 1703, 1911, 1703, 1517, 1517, 1517, 1703, 1703, 1703, 1517, 1276, 1276};
  int mary_dur[13] = '{1000, 1000, 1000, 1000, 1000, 1000, 1000, 1000, 1000, 1000, 1000, 1000, 1500};

  initial begin
    repeat (4) @(negedge clock);
    p1_btn = 0;
    for (int n = 0; n < 14; n++) begin
      automatic int k = n % 13;
      @(posedge d1); @(negedge clock);
      check(l1 == mary_hp[k] + 1 && !u1, $sformatf("note %0d: half-period %0d (got %0d)", n, mary_hp[k] + 1, l1));
      check(n1 * 2 * (mary_hp[k] + 1) <= mary_dur[k] * 1000 + 2 * (mary_hp[k] + 1) &&
            n1 * 2 * (mary_hp[k] + 1) >= mary_dur[k] * 1000 - 2 * (mary_hp[k] + 1) - 1000,
            $sformatf("note %0d: %0d cycles for %0d ms", n, n1, mary_dur[k]));
      n_tone++;
      if (k == 12) begin
        check(g1 >= 1000 * 1000 + 25 * 1000, "1 s rest, then GOTO to the start");
        n_rest++; n_goto++;
      end else begin
        // LOW time = 25 ms gap + the LOW ends of the two notes (each under a period)
        check(g1 >= 24 * 1000 && g1 <= 26 * 1000 + 4 * 1912, $sformatf("25 ms gap after note %0d (got %0d)", n, g1));
        n_gap++;
      end
    end
    music_done = 1;
  end

  // ------------------------------------------------------------ duet
  logic dr, ur, dl, ul; int lr, nr, rr, gr, ll, nl, rl, gl;
  tone_meter #(.GAP_CLOCKS(20_000)) mr (.clock, .pin(p2_jc[1]), .note_done(dr),
    .note_high_len(lr), .note_highs(nr), .uneven(ur), .low_run(rr), .gap_before(gr));
  tone_meter #(.GAP_CLOCKS(20_000)) ml (.clock, .pin(p2_jd[1]), .note_done(dl),
    .note_high_len(ll), .note_highs(nl), .uneven(ul), .low_run(rl), .gap_before(gl));

  initial begin
    repeat (4) @(negedge clock);
    p2_btn = 0;
    for (int n = 0; n < 2; n++) begin
      fork @(posedge dr); @(posedge dl); join
      @(negedge clock);
      check(lr == mary_hp[n] + 1 && ll == mary_hp[n] + 1, "duet: both voices play the note");
      n_duet++;
    end
    // go-to button: pips
    p2_sw = 8'd64; p2_btn[1] = 1; repeat (5) @(negedge clock); p2_btn[1] = 0; p2_sw = 0;
    n_gobtn++;
    fork @(posedge dr); @(posedge dl); join    // the cut note closes at the first pip
    for (int n = 0; n < 3; n++) begin
      fork @(posedge dr); @(posedge dl); join
      @(negedge clock);
      check(lr == 501 && ll == 501 && nr >= 99 && nr <= 100, $sformatf("duet: pip %0d at 1 kHz for 100 ms (got %0d x %0d)", n, lr, nr));
    end
    duet_done = 1;
  end

  // ------------------------------------------------------------ end
  initial begin
    wait (cpu_done && music_done && duet_done && basic_done);
    check(n_tone > 0 && n_rest > 0 && n_goto > 0 && n_gap > 0, "music: tone, rest, GOTO and gap seen");
    check(n_duet > 0 && n_gobtn > 0, "duet and go-to button seen");
    check(n_prime > 0 && n_memwr > 0 && n_hold > 0, "computer: OUT, MEMORY write and BREAK hold seen");
    check(n_bprime > 0 && n_bpause > 0, "plain computer: prime shown and pause seen");
    $display("tones=%0d rests=%0d gotos=%0d gaps=%0d duet=%0d primes=%0d memwrites=%0d holds=%0d plain_primes=%0d pauses=%0d",
             n_tone, n_rest, n_goto, n_gap, n_duet, n_prime, n_memwr, n_hold, n_bprime, n_bpause);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
