// piano_duet: two copies of the music machine playing at the same time, each
// reading its own tune ROM and driving its own pin: the right-hand voice on
// jc[1], the left-hand voice on jd[1]. Summing the two pins (an op-amp
// mixer, or simply two speakers) is done off chip.
//
// Both voices share the 1 MHz clock, the 1 ms time base and the controls:
// btn[0] resets both to address 0, holding btn[1] loads both addresses from
// sw[7:0], sw[0] up silences both. The display shows the left-hand address
// on digits 3-2 and the right-hand address on digits 1-0. jc[4:2] and
// jd[4:2] are low.
//
// The structure, pins and display follow the lab description. Both ROMs are
// tune_rom: the left-hand part of the tune is not part of this design, so
// the two voices play the same table unless each is given its own contents.
module piano_duet #(
  parameter int unsigned CLKS_PER_MS = 1000,
  parameter int unsigned GAP_MS      = 25,
  parameter int unsigned SCAN_BITS   = 10
) (
  input  logic       clock,
  input  logic [3:0] btn,
  input  logic [7:0] sw,
  output logic [4:1] jc,
  output logic [4:1] jd,
  output logic [6:0] seg,
  output logic       dp,
  output logic [3:0] an
);

  logic        pulse, wiggle_r, wiggle_l;
  logic [7:0]  addr_r, addr_l;
  logic [15:0] data_r, data_l;

  pulse_1khz #(.CLKS_PER_PULSE(CLKS_PER_MS)) tick (
    .clock, .reset(btn[0]), .pulse_1kHz(pulse)
  );

  tune_rom rom_r (.address(addr_r), .dataout(data_r));
  tune_rom rom_l (.address(addr_l), .dataout(data_l));

  playerpiano #(.GAP_MS(GAP_MS)) right_hand (
    .wigglewire(wiggle_r), .clock, .reset(btn[0]), .gotobutton(btn[1]),
    .stopthenoise(sw[0]), .pulse_1kHz(pulse), .memaddr(addr_r),
    .memdata(data_r), .startaddr(sw), .state(), .duration(), .halfperiod(),
    .count_msec()
  );

  playerpiano #(.GAP_MS(GAP_MS)) left_hand (
    .wigglewire(wiggle_l), .clock, .reset(btn[0]), .gotobutton(btn[1]),
    .stopthenoise(sw[0]), .pulse_1kHz(pulse), .memaddr(addr_l),
    .memdata(data_l), .startaddr(sw), .state(), .duration(), .halfperiod(),
    .count_msec()
  );

  assign jc = {3'b000, wiggle_r};
  assign jd = {3'b000, wiggle_l};

  display_digits #(.SCAN_BITS(SCAN_BITS)) disp (
    .clock, .digits({addr_l, addr_r}), .dots(4'b0000), .seg, .dp, .an
  );

endmodule
