// tone_meter: testbench helper that listens to a speaker pin and splits it
// into notes. A HIGH run ends a half-cycle; a LOW run longer than
// GAP_CLOCKS separates notes. For each finished note it reports the length
// of its HIGH runs (the half-period in clocks, taken from the first HIGH
// run; 'uneven' flags a note whose HIGH runs differ, except the last one,
// which the end of the note may cut short), how many it had, and the LOW
// time that preceded the next note (gap_before).
// note_done pulses for one clock when a note is closed. The pin is ignored
// for the first SKIP_CLOCKS clocks, while the design under test is still
// being reset, so a machine that powers up in a HIGH state does not count.
module tone_meter #(
  parameter int GAP_CLOCKS  = 1000,
  parameter int SKIP_CLOCKS = 8
) (
  input  logic clock,
  input  logic pin,
  output logic note_done,
  output int   note_high_len,
  output int   note_highs,
  output logic uneven,
  output int   low_run,
  output int   gap_before
);
  int high_run = 0, cur_len = 0, cur_n = 0, age = 0;
  logic cur_uneven = 0, odd_seen = 0;
  initial begin low_run = 0; note_done = 0; note_high_len = 0; note_highs = 0; uneven = 0; gap_before = 0; end

  always @(posedge clock) begin
    note_done <= 0;
    if (age < SKIP_CLOCKS) age++;
    if (pin && age >= SKIP_CLOCKS) begin
      high_run++;
      if (low_run > GAP_CLOCKS && cur_n > 0) begin
        note_done <= 1; note_high_len <= cur_len; note_highs <= cur_n; uneven <= cur_uneven;
        gap_before <= low_run;
        cur_n = 0; cur_uneven = 0; odd_seen = 0;
      end
      low_run = 0;
    end else begin
      if (high_run > 0) begin
        if (odd_seen) cur_uneven = 1;   // a short run that was not the last
        if (cur_n == 0) cur_len = high_run;
        else if (high_run != cur_len) odd_seen = 1;
        cur_n++;
      end
      high_run = 0;
      low_run++;
    end
  end
endmodule
