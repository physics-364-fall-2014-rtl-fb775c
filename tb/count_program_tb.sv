// count_program_tb: runs a short counting program on the computer board, the
// kind of first program one writes for this machine: count from 1, OUT each
// value, then waste time in a delay loop before the next one.
//
// The RAM image tb/count_asm.hex holds (address: word):
//   00 load zero   01 store i    02 iloop: load i   03 add one   04 store i
//   05 out         06 load Kdelay 07 store k
//   08 kloop: load k  09 sub one  0a store k  0b jumpnz kloop  0c jump iloop
//   10 zero=0  11 one=1  12 i  13 k  14 Kdelay=F000
// Every other word is 0. Counting clocks per instruction (3, or 4 for
// STORE), one pass of the outer loop, measured from one OUT to the next,
// takes 23 + 13*Kdelay clocks.
//
// 1. RUN mode after a btn[1] reset: the display must count 1, 2, 3, 4, with
//    exactly 23 + 13*0xF000 = 798,743 clocks between steps.
// 2. BREAK mode: the count must hold after each OUT for more than a whole
//    period, and advance by exactly one per btn[0] press.
// 3. MEMORY mode: Kdelay is rewritten to 1 from the panel and read back.
//    Back in RUN mode, after a reset, the count must run 1..20 in hex, with
//    36 clocks between steps.
// Each of the three mechanisms must happen at least once. The watchdog
// bounds the whole run.
module count_program_tb;
  import lab27_pkg::*;

  localparam longint SLOW_PERIOD = 23 + 13 * 'hF000;
  localparam longint FAST_PERIOD = 23 + 13 * 1;

  logic clock = 0, por = 1;
  logic [3:0] btn = 0;
  logic [7:0] sw = 0;
  logic [7:0] led;
  logic [6:0] seg;
  logic dp;
  logic [3:0] an;
  logic [15:0] display_value;

  int checks = 0, failures = 0;
  int n_slow = 0, n_holds = 0, n_fast = 0;
  longint cycle = 0;

  cpu_board #(.INIT_FILE("tb/count_asm.hex"), .SCAN_BITS(4)) dut (.*);
  always #5 clock = ~clock;
  always @(posedge clock) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL t=%0t %s (display=%h)", $time, what, display_value);
    end
  endtask

  task automatic press(input int b);
    btn[b] = 1; repeat (4) @(negedge clock);
    btn[b] = 0; repeat (4) @(negedge clock);
  endtask

  // wait for the display to change, up to 'limit' clocks; report when
  task automatic wait_change(input longint limit, output bit changed, output longint at);
    logic [15:0] v = display_value;
    changed = 0;
    at = 0;
    for (longint t = 0; t < limit; t++) begin
      @(negedge clock);
      if (display_value != v) begin changed = 1; at = cycle; break; end
    end
  endtask

  initial begin
    bit ch;
    longint t_prev, t_now;
    logic [15:0] held;

    repeat (4) @(negedge clock);
    por = 0;
    press(1);  // reset the CPU

    // ---------------------------------------------------------------- 1. RUN
    wait_change(200, ch, t_prev);
    check(ch && display_value == 16'd1, "first OUT should be 1 soon after reset");
    for (int n = 2; n <= 4; n++) begin
      wait_change(SLOW_PERIOD + 100, ch, t_now);
      check(ch && display_value == 16'(n), $sformatf("RUN count should be %0d", n));
      check(t_now - t_prev == SLOW_PERIOD,
            $sformatf("period %0d clocks, expected %0d", t_now - t_prev, SLOW_PERIOD));
      if (ch) n_slow++;
      t_prev = t_now;
    end

    // ---------------------------------------------------------------- 2. BREAK
    press(3);
    check(dut.mode == MODE_BREAK, "btn[3] should select BREAK mode");
    wait_change(SLOW_PERIOD + 100, ch, t_now);
    check(ch && display_value == 16'd5, "BREAK: next OUT should still arrive");
    for (int n = 0; n < 2; n++) begin
      held = display_value;
      wait_change(SLOW_PERIOD + 1000, ch, t_now);
      check(!ch && display_value == held, "BREAK: count should hold after OUT");
      if (!ch) n_holds++;
      press(0);
      wait_change(SLOW_PERIOD + 100, ch, t_now);
      check(ch && display_value == held + 16'd1, "BREAK: btn[0] should release one step");
    end

    // ---------------------------------------------------------------- 3. MEMORY
    press(3);
    press(3);
    check(dut.mode == MODE_MEMORY, "two more btn[3] presses should select MEMORY");
    sw = 8'h14; press(0);
    check(display_value == 16'hF000, "MEMORY: Kdelay should read F000");
    sw = 8'h01; press(1);
    sw = 8'h00; press(2);
    check(display_value == 16'h0001, "MEMORY: Kdelay should read back 0001");
    press(3);
    check(dut.mode == MODE_RUN, "btn[3] should wrap to RUN");
    press(1);
    wait_change(200, ch, t_prev);
    check(ch && display_value == 16'd1, "fast count should restart at 1");
    for (int n = 2; n <= 20; n++) begin
      wait_change(FAST_PERIOD + 10, ch, t_now);
      check(ch && display_value == 16'(n), $sformatf("fast count should be %h", 16'(n)));
      check(t_now - t_prev == FAST_PERIOD,
            $sformatf("fast period %0d clocks, expected %0d", t_now - t_prev, FAST_PERIOD));
      if (ch) n_fast++;
      t_prev = t_now;
    end

    $display("mechanisms: run_steps=%0d break_holds=%0d fast_steps=%0d", n_slow, n_holds, n_fast);
    check(n_slow > 0, "RUN-mode counting never happened");
    check(n_holds > 0, "BREAK hold never happened");
    check(n_fast > 0, "counting after the memory patch never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12_000_000) @(posedge clock);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
