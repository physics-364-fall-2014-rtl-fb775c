// pulse_1khz: the music machine's time base. Divides the 1 MHz system clock
// by CLKS_PER_PULSE and emits a pulse one clock (1 us) wide once every
// CLKS_PER_PULSE clocks (once per millisecond at the default), so the
// millisecond counter can stay on the single system clock as a clock enable.
//
// Timing: the counter holds 0 on the last reset clock, so the first pulse
// comes CLKS_PER_PULSE-1 clocks after reset is released, on
// the clock where the internal counter holds CLKS_PER_PULSE-1. The pulse
// shape and rate follow the lab description; the counter itself is this
// design's.
module pulse_1khz #(
  parameter int unsigned CLKS_PER_PULSE = 1000
) (
  input  logic clock,
  input  logic reset,
  output logic pulse_1kHz
);

  localparam int unsigned W = (CLKS_PER_PULSE > 1) ? $clog2(CLKS_PER_PULSE) : 1;
  logic [W-1:0] count;

  always_ff @(posedge clock) begin
    if (reset || count == W'(CLKS_PER_PULSE - 1)) count <= '0;
    else                                          count <= count + 1'b1;
  end

  assign pulse_1kHz = (count == W'(CLKS_PER_PULSE - 1));

endmodule
