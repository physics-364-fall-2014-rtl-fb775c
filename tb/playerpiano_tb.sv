// playerpiano_tb: self-checking test of the music state machine.
//
// A small tune table lives in this testbench: a tone (3 ms, half-period 4),
// a rest (2 ms), a GOTO to address 10, a second tone (2 ms, half-period 7)
// and a GOTO back to 0. The 1 kHz pulse is replaced by a pulse every P clocks
// so that a "millisecond" is short. The checker, independent of the design:
//   - predicts the address of every note fetch from the table (following the
//     GOTOs, the go-to button and stop/reset),
//   - checks every complete HIGH or LOW half-cycle lasts halfperiod+1 clocks
//     and that a rest never drives the pin,
//   - counts ms pulses: exactly 'duration' of them between FETCHPITCH and
//     NOTEDONE and exactly GAP_MS between NOTEDONE and the next fetch,
//   - checks stopthenoise holds the machine silent in START.
// Each mechanism (tone, rest, GOTO, gap, go-to button, stop) must occur.
module playerpiano_tb;
  import lab27_pkg::*;

  localparam int P = 16;        // clocks per "millisecond" pulse
  localparam int GAP = 25;

  logic clock = 0, reset = 1, gotobutton = 0, stopthenoise = 0, pulse_1kHz = 0;
  logic wigglewire;
  logic [7:0] memaddr, startaddr = 0;
  logic [15:0] memdata, duration, halfperiod, count_msec;
  logic [2:0] state;

  int checks = 0, failures = 0;
  int n_tone = 0, n_rest = 0, n_goto = 0, n_gap = 0, n_gobtn = 0, n_stop = 0, n_halfcyc = 0;

  playerpiano #(.GAP_MS(GAP)) dut (.*);

  function automatic logic [15:0] rom(input logic [7:0] a);
    case (a)
      0: return 3;   1: return 4;
      2: return 2;   3: return 0;
      4: return 0;   5: return 10;
      10: return 2;  11: return 7;
      default: return 0;
    endcase
  endfunction
  assign memdata = rom(memaddr);

  always #5 clock = ~clock;

  int pc = 0;
  always @(posedge clock) begin
    pc = (pc + 1) % P;
    pulse_1kHz <= (pc == 0);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t %s (state=%0d addr=%0d)", $time, what, state, memaddr);
    end
  endtask

  // ---------------------------------------------------------------- checker
  logic [7:0]  exp_addr = 0;
  logic [2:0]  prev = 0;
  int run_len = 0, pulses = 0, clocks = 0;
  logic [15:0] cur_dur = 0, cur_hp = 0;
  bit in_rest = 0;

  always @(posedge clock) begin
    if (reset || stopthenoise) begin
      exp_addr = 0;
    end else if (gotobutton) begin
      exp_addr = startaddr;
    end else begin
      clocks++;
      if (pulse_1kHz) pulses++;
      unique case (pp_state_e'(state))
        PP_FETCHDURA: begin
          if (prev == 3'(PP_NOTEGAP)) begin
            check(pulses == GAP, "gap length in ms pulses");
            n_gap++;
          end
          check(memaddr == exp_addr, "fetch address");
          exp_addr = (rom(memaddr) == 0) ? 8'(rom(memaddr + 8'd1)) : memaddr + 8'd2;
        end
        PP_FETCHPITCH: begin
          cur_dur = duration; cur_hp = memdata;
          pulses = 0; clocks = 0;
          if (duration == 0) n_goto++;
          else if (memdata == 0) n_rest++;
          else n_tone++;
          in_rest = (memdata == 0);
        end
        PP_WIGGLE0, PP_WIGGLE1: begin
          if (state == prev) run_len++;
          else begin
            if (prev == 3'(PP_WIGGLE0) || prev == 3'(PP_WIGGLE1)) begin
              check(run_len == int'(cur_hp) + 1, "half-period length");
              n_halfcyc++;
            end
            run_len = 1;
          end
          if (in_rest) check(!wigglewire && state == 3'(PP_WIGGLE0), "rest is silent");
        end
        PP_NOTEDONE: begin
          check(pulses - (pulse_1kHz ? 1 : 0) == int'(cur_dur), "note length in ms pulses");
          check(clocks <= int'(cur_dur) * P + 2 && clocks >= (int'(cur_dur) - 1) * P, "note length in clocks");
          pulses = 0;
        end
        default: ;
      endcase
      check(wigglewire == (state == 3'(PP_WIGGLE1)), "pin follows WIGGLE1");
    end
    prev = state;
  end

  initial begin
    repeat (200000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clock);
    reset = 0;
    repeat (3000) @(negedge clock);
    // go-to button: jump to the second tone
    startaddr = 10; gotobutton = 1; n_gobtn++;
    repeat (5) @(negedge clock);
    gotobutton = 0;
    @(negedge clock);
    @(negedge clock);
    check(state == 3'(PP_FETCHPITCH) || state == 3'(PP_WIGGLE0), "playing after go-to");
    repeat (2000) @(negedge clock);
    // stop switch
    stopthenoise = 1; n_stop++;
    repeat (3) @(negedge clock);
    for (int t = 0; t < 200; t++) begin
      check(state == 3'(PP_START) && !wigglewire, "stopped in START");
      @(negedge clock);
    end
    stopthenoise = 0;
    repeat (2500) @(negedge clock);
    // reset mid-note
    reset = 1; repeat (2) @(negedge clock); reset = 0;
    repeat (1500) @(negedge clock);

    check(n_tone > 0, "tone played");
    check(n_rest > 0, "rest played");
    check(n_goto > 0, "GOTO taken");
    check(n_gap > 0, "note gap seen");
    check(n_halfcyc > 0, "half-cycles measured");
    check(n_gobtn > 0 && n_stop > 0, "go-to button and stop used");
    $display("tones=%0d rests=%0d gotos=%0d gaps=%0d halfcycles=%0d", n_tone, n_rest, n_goto, n_gap, n_halfcyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
