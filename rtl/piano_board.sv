// piano_board: the single-voice music machine on the FPGA board: playerpiano
// reading tune_rom, the 1 ms time base and the display.
//
// Controls: btn[0] resets (play from address 0); holding btn[1] loads the
// ROM address from the switches sw[7:0] (play resumes from there on
// release); sw[0] up silences the machine (held in START).
// Outputs: jc[1] is the speaker pin; jc[4:2] are low; jd[4:1] bring out
// {clock, 1 ms pulse, ms counter bit 0, ms counter bit 15} for a scope. The
// LEDs show the low byte of the current half-period. While btn[1] is held
// the four digits show the ROM word at the current address; otherwise they
// show, left to right, the address (two digits), the state number and the
// time left in the note in units of 128 ms. The decimal points mirror
// btn[3:0].
//
// The clock is expected at 1 MHz (CLKS_PER_MS clocks per millisecond). The
// wiring follows the lab description; the time-left digit (bits 10:7 of
// duration - elapsed ms) is this design's reading of it.
module piano_board #(
  parameter int unsigned CLKS_PER_MS = 1000,
  parameter int unsigned GAP_MS      = 25,
  parameter int unsigned SCAN_BITS   = 10
) (
  input  logic       clock,
  input  logic [3:0] btn,
  input  logic [7:0] sw,
  output logic [7:0] led,
  output logic [4:1] jc,
  output logic [4:1] jd,
  output logic [6:0] seg,
  output logic       dp,
  output logic [3:0] an
);

  logic        pulse, wiggle;
  logic [7:0]  memory_addr;
  logic [15:0] memory_data, duration, halfperiod, count_msec, timeleft;
  logic [2:0]  state;
  logic [3:0][3:0] digits;

  pulse_1khz #(.CLKS_PER_PULSE(CLKS_PER_MS)) tick (
    .clock, .reset(btn[0]), .pulse_1kHz(pulse)
  );

  tune_rom rom (.address(memory_addr), .dataout(memory_data));

  playerpiano #(.GAP_MS(GAP_MS)) piano (
    .wigglewire(wiggle), .clock, .reset(btn[0]), .gotobutton(btn[1]),
    .stopthenoise(sw[0]), .pulse_1kHz(pulse), .memaddr(memory_addr),
    .memdata(memory_data), .startaddr(sw), .state, .duration, .halfperiod,
    .count_msec
  );

  assign timeleft = duration - count_msec;
  assign digits   = btn[1] ? memory_data
                           : {memory_addr, 1'b0, state, timeleft[10:7]};
  assign led      = halfperiod[7:0];
  assign jc       = {3'b000, wiggle};
  assign jd       = {clock, pulse, count_msec[0], count_msec[15]};

  display_digits #(.SCAN_BITS(SCAN_BITS)) disp (
    .clock, .digits, .dots(btn), .seg, .dp, .an
  );

endmodule
