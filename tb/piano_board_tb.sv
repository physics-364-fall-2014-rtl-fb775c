// piano_board_tb: plays the board's tunes and checks what comes out of the
// speaker pin. A "millisecond" is shortened to CPM clocks; half-periods stay
// in clocks (microseconds), so pitches are exact.
//
// Checks: after reset the pin plays "Mary Had a Little Lamb" note by note
// (E D C D E E E D D D E G G, each HIGH run = half-period + 1 clocks, the
// number of cycles matching the note's duration), then a rest longer than
// a note, then the tune again (the GOTO at its end). Holding btn[1] with
// the switches at 64 shows the ROM word on the display and starts the
// pips (half-period 500); sw[0] silences the pin; jd[3] carries the 1 ms
// pulse. Each mechanism must have been seen.
module piano_board_tb;
  localparam int CPM = 100;

  logic clock = 0;
  logic [3:0] btn = 4'b0001;
  logic [7:0] sw = 0;
  logic [7:0] led;
  logic [4:1] jc, jd;
  logic [6:0] seg;
  logic dp;
  logic [3:0] an;

  int checks = 0, failures = 0;
  int n_notes = 0, n_rest = 0, n_repeat = 0, n_pips = 0, n_stop = 0, n_pulse = 0;

  piano_board #(.CLKS_PER_MS(CPM), .SCAN_BITS(1)) dut (.*);
  always #5 clock = ~clock;

  logic note_done, uneven;
  int note_high_len, note_highs, low_run, gap_before;
  tone_meter #(.GAP_CLOCKS(20 * CPM)) meter (.clock, .pin(jc[1]), .note_done,
    .note_high_len, .note_highs, .uneven, .low_run, .gap_before);

  always @(posedge clock) if (jd[3]) n_pulse++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL t=%0t %s", $time, what); end
  endtask

  // expected tune: half-periods and durations (ms)
  int mary_hp[13]  = '{1517, 1703, 1911, 1703, 1517, 1517, 1517, 1703, 1703, 1703, 1517, 1276, 1276};
  int mary_dur[13] = '{1000, 1000, 1000, 1000, 1000, 1000, 1000, 1000, 1000, 1000, 1000, 1000, 1500};

  task automatic next_note(input int hp, input int dur, input string what);
    automatic int guard = 0;
    while (!note_done && guard < 4 * 1500 * CPM) begin @(negedge clock); guard++; end
    check(note_done, {what, ": note finished"});
    check(note_high_len == hp + 1 && !uneven, $sformatf("%s: half-period %0d (got %0d)", what, hp + 1, note_high_len));
    // length covered by the HIGH runs: within one cycle plus one ms of the duration
    check(note_highs * 2 * (hp + 1) <= dur * CPM + 2 * (hp + 1) &&
          note_highs * 2 * (hp + 1) >= dur * CPM - 2 * (hp + 1) - CPM,
          $sformatf("%s: %0d cycles for %0d ms", what, note_highs, dur));
    @(negedge clock);
  endtask

  initial begin
    repeat (8_000_000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(negedge clock);
    btn = 0;
    // ---- first pass through the tune: the first note is closed by the second
    for (int n = 1; n < 13; n++) begin
      next_note(mary_hp[n - 1], mary_dur[n - 1], $sformatf("note %0d", n - 1));
      n_notes++;
    end
    // last G is closed by the 1 s rest; the rest is longer than any gap
    next_note(mary_hp[12], mary_dur[12], "note 12");
    check(gap_before > 1000 * CPM, "1 s rest before the repeat");
    n_rest++;
    // tune starts again (GOTO 0)
    next_note(mary_hp[0], mary_dur[0], "repeat note 0");
    n_repeat++;
    // ---- go-to button: pips at address 64
    sw = 8'd64; btn[1] = 1;
    repeat (3) @(negedge clock);
    check(dut.digits == 16'd1000 && dut.memory_addr == 8'd64, "btn[1]: ROM word at switch address shown");
    check(led == 8'(1517) || led == 8'(1703), "LEDs show the half-period");
    btn[1] = 0; sw = 0;
    // first pip closes after the second begins
    // the note cut short by the button closes when the first pip starts
    begin
      automatic int guard = 0;
      while (!note_done && guard < 3000 * CPM) begin @(negedge clock); guard++; end
      @(negedge clock);
    end
    for (int k = 0; k < 2; k++) begin
      automatic int guard = 0;
      while (!note_done && guard < 3000 * CPM) begin @(negedge clock); guard++; end
      check(note_done && note_high_len == 501 && note_highs >= 9 && note_highs <= 10, "pip: 1 kHz for 100 ms");
      n_pips++;
      @(negedge clock);
    end
    // ---- stop switch
    sw[0] = 1;
    repeat (10) @(negedge clock);
    for (int t = 0; t < 5000; t++) begin
      checks++;
      if (jc[1] || dut.state != 3'd0) failures++;
      @(negedge clock);
    end
    n_stop++;
    sw[0] = 0;

    check(n_pulse > 1000, "1 ms pulse brought out on jd[3]");
    check(n_notes > 0 && n_rest > 0 && n_repeat > 0 && n_pips > 0 && n_stop > 0, "all mechanisms seen");
    $display("notes=%0d rests=%0d repeats=%0d pips=%0d", n_notes, n_rest, n_repeat, n_pips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
