// playerpiano: a state machine that plays a tune stored in a ROM as a list of
// (duration, half-period) pairs, by toggling one output pin.
//
// Operation (one clock = 1 us at the intended 1 MHz clock):
//   START       address := 0
//   FETCHDURA   duration := memdata (ms); address := address + 1
//   FETCHPITCH  halfperiod := memdata (us); address := address + 1;
//               both counters cleared. If duration == 0 the pair is a GOTO.
//   GOTO        address := halfperiod[7:0], then FETCHDURA
//   WIGGLE0/1   pin LOW / HIGH; the microsecond counter counts clocks and
//               when it equals halfperiod the machine toggles between the two
//               states and restarts the count. A half-period of 0 is a rest:
//               the machine stays in WIGGLE0. When the millisecond counter
//               (advanced by pulse_1kHz) equals duration: NOTEDONE.
//   NOTEDONE    millisecond counter cleared, then NOTEGAP
//   NOTEGAP     silence until GAP_MS milliseconds have passed, then the next
//               FETCHDURA.
// 'reset' or 'stopthenoise' holds the machine in START. While 'gotobutton'
// is held the address is loaded from 'startaddr' and the machine waits in
// FETCHDURA, so play resumes from there when it is released.
//
// Timing: because the microsecond counter restarts on the clock where it
// matched, each half-period lasts halfperiod+1 clocks. A note lasts
// 'duration' pulses of pulse_1kHz after FETCHPITCH (between duration-1 and
// duration ms), and the gap GAP_MS pulses. All of this, the state numbers
// and the GOTO / rest encodings follow the lab description. Resetting the
// address, duration and half-period registers with 'reset' is this design's
// choice (the originals were loaded without reset); the extra outputs
// duration, halfperiod and count_msec exist for the board's display.
module playerpiano
  import lab27_pkg::*;
#(
  parameter int unsigned GAP_MS = 25
) (
  output logic        wigglewire,   // speaker pin
  input  logic        clock,        // 1 MHz
  input  logic        reset,        // start play from address 0
  input  logic        gotobutton,   // start play from 'startaddr'
  input  logic        stopthenoise, // hold in START (silence)
  input  logic        pulse_1kHz,   // one clock wide, once per ms
  output logic [7:0]  memaddr,      // ROM address
  input  logic [15:0] memdata,      // ROM data at memaddr
  input  logic [7:0]  startaddr,    // address for gotobutton
  output logic [2:0]  state,        // state number (for display)
  output logic [15:0] duration,     // current note duration (ms)
  output logic [15:0] halfperiod,   // current note half-period (us)
  output logic [15:0] count_msec    // ms elapsed in the note / gap
);

  pp_state_e st, st_next;
  logic [15:0] count_usec;
  logic zeroduration, zeroperiod, wigglenow, durationup, notegapdone;

  assign zeroduration = (duration == 16'd0);
  assign zeroperiod   = (halfperiod == 16'd0);
  assign wigglenow    = (count_usec == halfperiod);
  assign durationup   = (count_msec == duration);
  assign notegapdone  = (count_msec == 16'(GAP_MS));

  // ------------------------------------------------------------ next state
  always_comb begin
    st_next = st;
    if (reset || stopthenoise)                st_next = PP_START;
    else if (st == PP_START || gotobutton)    st_next = PP_FETCHDURA;
    else begin
      unique case (st)
        PP_FETCHDURA:  st_next = PP_FETCHPITCH;
        PP_FETCHPITCH: st_next = zeroduration ? PP_GOTO : PP_WIGGLE0;
        PP_GOTO:       st_next = PP_FETCHDURA;
        PP_WIGGLE0:    if (durationup)     st_next = PP_NOTEDONE;
                       else if (zeroperiod) st_next = PP_WIGGLE0;
                       else if (wigglenow)  st_next = PP_WIGGLE1;
        PP_WIGGLE1:    if (durationup)     st_next = PP_NOTEDONE;
                       else if (wigglenow)  st_next = PP_WIGGLE0;
        PP_NOTEDONE:   st_next = PP_NOTEGAP;
        PP_NOTEGAP:    if (notegapdone)    st_next = PP_FETCHDURA;
        default:       st_next = st;
      endcase
    end
  end

  always_ff @(posedge clock) begin
    if (reset) st <= PP_START;
    else       st <= st_next;
  end

  assign state      = st;
  assign wigglewire = (st == PP_WIGGLE1);

  // ------------------------------------------------------------ ROM address
  always_ff @(posedge clock) begin
    if (gotobutton)                                    memaddr <= startaddr;
    else if (reset || st == PP_START)                  memaddr <= 8'd0;
    else if (st == PP_FETCHDURA || st == PP_FETCHPITCH) memaddr <= memaddr + 8'd1;
    else if (st == PP_GOTO)                            memaddr <= halfperiod[7:0];
  end

  // ------------------------------------------------------------ note registers
  always_ff @(posedge clock) begin
    if (reset) begin
      duration   <= '0;
      halfperiod <= '0;
    end else begin
      if (st == PP_FETCHDURA)  duration   <= memdata;
      if (st == PP_FETCHPITCH) halfperiod <= memdata;
    end
  end

  // ------------------------------------------------------------ counters
  always_ff @(posedge clock) begin
    if (st == PP_FETCHPITCH || wigglenow) count_usec <= '0;
    else                                  count_usec <= count_usec + 16'd1;
  end

  always_ff @(posedge clock) begin
    if (st == PP_FETCHPITCH || st == PP_NOTEDONE) count_msec <= '0;
    else if (pulse_1kHz)                          count_msec <= count_msec + 16'd1;
  end

endmodule
