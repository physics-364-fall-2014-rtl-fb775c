// piano_duet_tb: checks that the two voices play at the same time on their
// own pins: after reset both jc[1] and jd[1] play the opening notes of the
// tune at address 0 with the right half-periods; holding btn[1] with the
// switches at 96 moves both voices, the display shows both addresses
// (left on digits 3-2, right on digits 1-0), and both then play the
// Invention opening (rest, then E with half-period 1516). sw[0] silences
// both. A "millisecond" is CPM clocks.
module piano_duet_tb;
  localparam int CPM = 100;

  logic clock = 0;
  logic [3:0] btn = 4'b0001;
  logic [7:0] sw = 0;
  logic [4:1] jc, jd;
  logic [6:0] seg;
  logic dp;
  logic [3:0] an;
  int checks = 0, failures = 0;
  int n_both = 0;

  piano_duet #(.CLKS_PER_MS(CPM), .SCAN_BITS(1)) dut (.*);
  always #5 clock = ~clock;

  logic done_r, done_l, unev_r, unev_l;
  int len_r, len_l, n_r, n_l, low_r, low_l, gap_r, gap_l;
  tone_meter #(.GAP_CLOCKS(20 * CPM)) meter_r (.clock, .pin(jc[1]), .note_done(done_r),
    .note_high_len(len_r), .note_highs(n_r), .uneven(unev_r), .low_run(low_r), .gap_before(gap_r));
  tone_meter #(.GAP_CLOCKS(20 * CPM)) meter_l (.clock, .pin(jd[1]), .note_done(done_l),
    .note_high_len(len_l), .note_highs(n_l), .uneven(unev_l), .low_run(low_l), .gap_before(gap_l));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL t=%0t %s", $time, what); end
  endtask

  // both voices finish a note within a few clocks of each other
  task automatic both_notes(input int hp, input string what);
    automatic int guard = 0;
    automatic bit got_r = 0, got_l = 0;
    while (!(got_r && got_l) && guard < 3 * 1500 * CPM) begin
      @(negedge clock); guard++;
      if (done_r) begin got_r = 1; check(len_r == hp + 1 && !unev_r, {what, ": right voice pitch"}); end
      if (done_l) begin got_l = 1; check(len_l == hp + 1 && !unev_l, {what, ": left voice pitch"}); end
    end
    check(got_r && got_l, {what, ": both voices played"});
    n_both++;
  endtask

  initial begin
    repeat (2_000_000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(negedge clock);
    btn = 0;
    both_notes(1517, "E");
    both_notes(1703, "D");
    both_notes(1911, "C");
    sw = 8'd96; btn[1] = 1;
    repeat (3) @(negedge clock);
    check(dut.disp.digits == 16'h6060, "display shows both addresses");
    btn[1] = 0; sw = 0;
    repeat (3) @(negedge clock);
    check(dut.disp.digits == 16'h6161 || dut.disp.digits == 16'h6262, "both voices advanced");
    // the note cut by the button closes when the Invention's first E starts
    begin
      automatic int guard = 0;
      automatic bit got_r = 0, got_l = 0;
      while (!(got_r && got_l) && guard < 3000 * CPM) begin
        @(negedge clock); guard++;
        if (done_r) got_r = 1;
        if (done_l) got_l = 1;
      end
      check(gap_r > 125 * CPM && gap_l > 125 * CPM, "eighth rest before the first E");
    end
    both_notes(1516, "Invention E");
    sw[0] = 1;
    repeat (10) @(negedge clock);
    for (int t = 0; t < 3000; t++) begin
      checks++;
      if (jc[1] || jd[1]) failures++;
      @(negedge clock);
    end
    check(n_both >= 4, "voices played together");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
