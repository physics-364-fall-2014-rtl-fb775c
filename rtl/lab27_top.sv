// lab27_top: the four board designs side by side, each with its own clock
// and its own buttons, switches and outputs, as they would be loaded onto a
// board one at a time:
//   p1_*  piano_board     - the single-voice music machine (1 MHz clock)
//   p2_*  piano_duet      - two music machines playing together (1 MHz clock)
//   b_*   basic_cpu_board - the little accumulator computer, free running,
//                           showing the primes computed by the program in RAM
//   c_*   cpu_board       - the same computer with its debug panel
// They share nothing. See each module for its controls and timing.
module lab27_top (
  // single-voice music machine
  input  logic        p1_clock,
  input  logic [3:0]  p1_btn,
  input  logic [7:0]  p1_sw,
  output logic [7:0]  p1_led,
  output logic [4:1]  p1_jc,
  output logic [4:1]  p1_jd,
  output logic [6:0]  p1_seg,
  output logic        p1_dp,
  output logic [3:0]  p1_an,
  // two-voice music machine
  input  logic        p2_clock,
  input  logic [3:0]  p2_btn,
  input  logic [7:0]  p2_sw,
  output logic [4:1]  p2_jc,
  output logic [4:1]  p2_jd,
  output logic [6:0]  p2_seg,
  output logic        p2_dp,
  output logic [3:0]  p2_an,
  // computer, plain
  input  logic        b_clock,
  input  logic [3:0]  b_btn,
  input  logic [7:0]  b_sw,
  output logic [7:0]  b_led,
  output logic [6:0]  b_seg,
  output logic        b_dp,
  output logic [3:0]  b_an,
  // computer with debug panel
  input  logic        c_clock,
  input  logic        c_por,
  input  logic [3:0]  c_btn,
  input  logic [7:0]  c_sw,
  output logic [7:0]  c_led,
  output logic [6:0]  c_seg,
  output logic        c_dp,
  output logic [3:0]  c_an,
  output logic [15:0] c_display_value
);

  piano_board music (
    .clock(p1_clock), .btn(p1_btn), .sw(p1_sw), .led(p1_led), .jc(p1_jc),
    .jd(p1_jd), .seg(p1_seg), .dp(p1_dp), .an(p1_an)
  );

  piano_duet duet (
    .clock(p2_clock), .btn(p2_btn), .sw(p2_sw), .jc(p2_jc), .jd(p2_jd),
    .seg(p2_seg), .dp(p2_dp), .an(p2_an)
  );

  basic_cpu_board basic (
    .clock(b_clock), .btn(b_btn), .sw(b_sw), .led(b_led), .seg(b_seg),
    .dp(b_dp), .an(b_an)
  );

  cpu_board computer (
    .clock(c_clock), .por(c_por), .btn(c_btn), .sw(c_sw), .led(c_led),
    .seg(c_seg), .dp(c_dp), .an(c_an), .display_value(c_display_value)
  );

endmodule
