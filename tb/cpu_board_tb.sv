// cpu_board_tb: end-to-end test of the computer board running the
// prime-number program from its power-up RAM image.
//
// 1. MEMORY mode: the two delay constants of the program (Jdelay at 0x6f,
//    Kdelay at 0x70) are rewritten to 1 through the front panel (load the
//    address from the switches, step it, write low and high bytes), and read
//    back on the display.
// 2. RUN mode after a btn[1] reset: every new value of the OUT register
//    shown on the display must be the next prime, as four BCD digits; the
//    primes are computed here by trial division.
// 3. The display selections sw[7..3] are compared with the CPU's registers.
// 4. BREAK mode: the CPU must hold each new prime until btn[0].
// 5. STEP mode: each btn[0] press executes one instruction.
// The watchdog bounds the whole run.
module cpu_board_tb;
  import lab27_pkg::*;

  logic clock = 0, por = 1;
  logic [3:0] btn = 0;
  logic [7:0] sw = 0;
  logic [7:0] led;
  logic [6:0] seg;
  logic dp;
  logic [3:0] an;
  logic [15:0] display_value;

  int checks = 0, failures = 0;
  int n_primes = 0, n_holds = 0, n_steps = 0;

  cpu_board #(.SCAN_BITS(2)) dut (.*);
  always #5 clock = ~clock;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL t=%0t %s (display=%h led=%h)", $time, what, display_value, led);
    end
  endtask

  task automatic press(input int b);
    btn[b] = 1; repeat (4) @(negedge clock);
    btn[b] = 0; repeat (4) @(negedge clock);
  endtask

  function automatic bit is_prime(input int n);
    if (n < 2) return 0;
    for (int d = 2; d * d <= n; d++) if (n % d == 0) return 0;
    return 1;
  endfunction

  function automatic logic [15:0] bcd(input int n);
    return {4'(n / 1000), 4'((n / 100) % 10), 4'((n / 10) % 10), 4'(n % 10)};
  endfunction

  int next_p = 2;
  function automatic int advance(input int p);
    int q = p + 1;
    while (!is_prime(q)) q++;
    return q;
  endfunction

  // wait for the display (OUT register) to change, up to 'limit' clocks
  task automatic wait_change(input int limit, output bit changed);
    logic [15:0] v = display_value;
    changed = 0;
    for (int t = 0; t < limit; t++) begin
      @(negedge clock);
      if (display_value != v) begin changed = 1; break; end
    end
  endtask

  task automatic write_word(input logic [7:0] addr, input logic [15:0] w);
    sw = addr; press(0);
    sw = w[7:0]; press(1);
    sw = w[15:8]; press(2);
    sw = 0;
  endtask

  initial begin
    repeat (3000000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit ch;
    repeat (4) @(negedge clock);
    por = 0;
    // ---- 1. patch the delay constants in MEMORY mode
    press(3); press(3); press(3);
    check(dut.mode == MODE_MEMORY, "MEMORY mode reached");
    sw = 8'h6e; press(0); sw = 0;
    check(display_value == 16'h0001 && led == 8'h6e, "istart word shown");
    press(0);
    check(led == 8'h6f && display_value == 16'h1000, "Jdelay word shown");
    write_word(8'h6f, 16'h0001);
    check(display_value == 16'h0001, "Jdelay rewritten");
    sw = 0; press(0);
    check(led == 8'h70 && display_value == 16'h0300, "Kdelay word shown");
    write_word(8'h70, 16'h0001);
    check(display_value == 16'h0001, "Kdelay rewritten");
    btn[0] = 1; repeat (4) @(negedge clock);
    check(display_value == 16'h0071, "address (stepped by the press) shown while btn[0] held");
    btn[0] = 0; repeat (4) @(negedge clock);

    // ---- 2. RUN: primes appear in order
    press(3);
    check(dut.mode == MODE_RUN, "back in RUN");
    press(1);
    for (int k = 0; k < 12; k++) begin
      wait_change(200000, ch);
      check(ch, "a new value was output");
      check(display_value == bcd(next_p), $sformatf("prime %0d shown", next_p));
      next_p = advance(next_p);
      n_primes++;
    end

    // ---- 3. display selections
    sw = 8'h80; #1 check(display_value == {dut.PC, dut.memory_addr} && led == dut.PC, "sw[7]: PC, address");
    sw = 8'h40; #1 check(display_value == dut.IR, "sw[6]: IR");
    sw = 8'h20; #1 check(display_value == dut.memory_dataout, "sw[5]: RAM data");
    sw = 8'h10; #1 check(display_value == dut.AC, "sw[4]: AC");
    sw = 8'h08; #1 check(display_value == {12'h0, dut.state}, "sw[3]: state");
    sw = 8'h00;

    // ---- 4. BREAK mode holds each prime
    press(3);
    check(dut.mode == MODE_BREAK, "BREAK mode");
    for (int k = 0; k < 3; k++) begin
      wait_change(200000, ch);
      check(display_value == bcd(next_p), $sformatf("prime %0d shown in BREAK", next_p));
      next_p = advance(next_p);
      wait_change(5000, ch);
      check(!ch && !dut.run, "BREAK holds the prime");
      n_holds++;
      press(0);
    end

    // ---- 5. STEP mode
    press(3);
    check(dut.mode == MODE_STEP, "STEP mode");
    repeat (10) @(negedge clock);
    for (int k = 0; k < 5; k++) begin
      automatic logic [7:0] pc0 = dut.PC;
      check(dut.state == 4'(CPU_DECODE) && !dut.run, "STEP: paused in DECODE");
      press(0);
      check(dut.PC != pc0 || dut.IR[15:8] == OP_JUMP, "STEP: one instruction executed");
      n_steps++;
    end

    check(n_primes > 0 && n_holds > 0 && n_steps > 0, "all modes exercised");
    $display("primes=%0d holds=%0d steps=%0d", n_primes, n_holds, n_steps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
