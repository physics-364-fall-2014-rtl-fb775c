// cpu_debug_tb: checks the debug panel against a stand-in CPU.
//
// The stand-in is a counter that walks FETCH -> DECODE -> LOAD or OUT ->
// FETCH whenever cpu_run is high (every fourth instruction is an OUT) and
// increments its PC in FETCH; a 256-word array stands in for the RAM. The
// test presses buttons the way a user would and checks: mode rotation by
// btn[3]; RUN with the sw[0] pause and btn[1] reset; BREAK pausing in FETCH
// after each OUT and at PC == useraddr (set by btn[2]) and resuming on
// btn[0]; STEP advancing one instruction, or with sw[0] one clock, per press;
// MEMORY stopping the CPU, stepping / loading useraddr and writing the low
// and high bytes of a word.
module cpu_debug_tb;
  import lab27_pkg::*;

  logic clock = 0, por = 1;
  logic [3:0] btn = 0;
  logic [7:0] sw = 0;
  logic [3:0] cpu_state;
  logic [7:0] cpu_pc;
  logic [15:0] mem_dataout, mon_datain;
  dbg_mode_e mode;
  logic cpu_run, cpu_reset, mon_active, mon_write, btn0_held;
  logic [7:0] useraddr;
  logic [15:0] mem [256];

  int checks = 0, failures = 0;
  int n_outpause = 0, n_bppause = 0, n_istep = 0, n_cstep = 0, n_memwr = 0;

  cpu_debug dut (.*);
  always #5 clock = ~clock;

  // stand-in CPU
  int ninstr = 0, nclk = 0;
  always_ff @(posedge clock) begin
    if (cpu_reset) begin
      cpu_state <= 4'(CPU_FETCH); cpu_pc <= 0;
    end else if (cpu_run) begin
      nclk++;
      unique case (cpu_state)
        4'(CPU_FETCH):  begin cpu_state <= 4'(CPU_DECODE); cpu_pc <= cpu_pc + 1; end
        4'(CPU_DECODE): begin cpu_state <= (cpu_pc[1:0] == 0) ? 4'(CPU_OUT) : 4'(CPU_LOAD); end
        default:        begin cpu_state <= 4'(CPU_FETCH); ninstr++; end
      endcase
    end
  end
  assign mem_dataout = mem[useraddr];
  always_ff @(posedge clock) if (mon_write) mem[useraddr] <= mon_datain;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL t=%0t %s (mode=%0d state=%0d pc=%0d run=%b)", $time, what, mode, cpu_state, cpu_pc, cpu_run);
    end
  endtask

  task automatic press(input int b);
    btn[b] = 1; repeat (4) @(negedge clock);
    btn[b] = 0; repeat (4) @(negedge clock);
  endtask

  task automatic to_mode(input dbg_mode_e m);
    while (mode != m) press(3);
  endtask

  initial begin
    repeat (100000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c0;
    for (int a = 0; a < 256; a++) mem[a] = 16'(a * 3);
    btn = 4'b0010;                       // hold CPU reset during power-on
    repeat (4) @(negedge clock);
    por = 0;
    repeat (4) @(negedge clock);
    btn = 0;
    repeat (4) @(negedge clock);
    check(mode == MODE_RUN, "power-on mode is RUN");

    // ---------------- RUN: free running, sw[0] pauses
    c0 = nclk; repeat (50) @(negedge clock);
    check(nclk - c0 == 50, "RUN: runs every clock");
    sw[0] = 1; @(negedge clock);
    c0 = nclk; repeat (20) @(negedge clock);
    check(nclk == c0 && !cpu_run, "RUN: sw[0] pauses");
    sw[0] = 0;
    press(1);
    check(cpu_pc < 8, "RUN: btn[1] resets the CPU");

    // ---------------- BREAK: pause after OUT
    to_mode(MODE_BREAK);
    check(mode == MODE_BREAK, "btn[3] -> BREAK");
    useraddr_set(8'd200);
    for (int k = 0; k < 3; k++) begin
      automatic int guard = 0;
      while (cpu_run && guard < 100) begin @(negedge clock); guard++; end
      check(!cpu_run && cpu_state == 4'(CPU_FETCH) && cpu_pc[1:0] == 0, "BREAK: paused in FETCH after OUT");
      c0 = nclk; repeat (20) @(negedge clock);
      check(nclk == c0, "BREAK: stays paused");
      n_outpause++;
      press(0);
      check(nclk > c0, "BREAK: btn[0] resumes");
    end
    // breakpoint at PC == 6 (not right after an OUT)
    press(1);
    useraddr_set(8'd6);
    begin
      automatic int guard = 0;
      while (!(cpu_state == 4'(CPU_FETCH) && cpu_pc == 6 && !cpu_run) && guard < 200) begin
        if (!cpu_run) press(0);
        @(negedge clock); guard++;
      end
      check(cpu_pc == 6 && !cpu_run && cpu_state == 4'(CPU_FETCH), "BREAK: breakpoint at useraddr");
      n_bppause++;
    end

    // ---------------- STEP: one instruction per press
    to_mode(MODE_STEP);
    check(mode == MODE_STEP, "btn[3] -> STEP");
    repeat (5) @(negedge clock);
    check(cpu_state == 4'(CPU_DECODE) && !cpu_run, "STEP: paused in DECODE");
    for (int k = 0; k < 4; k++) begin
      c0 = ninstr;
      press(0);
      repeat (5) @(negedge clock);
      check(ninstr == c0 + 1 && cpu_state == 4'(CPU_DECODE), "STEP: one instruction per press");
      n_istep++;
    end
    sw[0] = 1;
    for (int k = 0; k < 4; k++) begin
      c0 = nclk;
      press(0);
      check(nclk == c0 + 1, "STEP+sw[0]: one clock per press");
      n_cstep++;
    end
    sw[0] = 0;

    // ---------------- MEMORY: CPU stopped, monitor owns RAM
    to_mode(MODE_MEMORY);
    check(mode == MODE_MEMORY && mon_active, "btn[3] -> MEMORY");
    c0 = nclk; repeat (20) @(negedge clock);
    check(nclk == c0 && !cpu_run, "MEMORY: CPU stopped");
    sw = 8'h40; press(0);
    check(useraddr == 8'h40, "MEMORY: btn[0] loads address from switches");
    sw = 8'h00; press(0); press(0);
    check(useraddr == 8'h42, "MEMORY: btn[0] steps the address");
    check(mem_dataout == 16'(8'h42 * 3), "MEMORY: word read");
    sw = 8'hA5; press(1);
    check(mem[8'h42] == {8'(8'h42 * 3 >> 8), 8'hA5}, "MEMORY: btn[1] writes low byte");
    sw = 8'h3C; press(2);
    check(mem[8'h42] == 16'h3CA5, "MEMORY: btn[2] writes high byte");
    check(mem[8'h41] == 16'(8'h41 * 3) && mem[8'h43] == 16'(8'h43 * 3), "MEMORY: neighbours untouched");
    check(!cpu_reset, "MEMORY: btn[1] is not a CPU reset");
    n_memwr += 2;
    sw = 0;
    press(3);
    check(mode == MODE_RUN, "btn[3] wraps to RUN");

    check(n_outpause > 0 && n_bppause > 0 && n_istep > 0 && n_cstep > 0 && n_memwr > 0, "all mechanisms seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic useraddr_set(input logic [7:0] a);
    sw = a; press(2); sw = 0;
    check(useraddr == a, "btn[2] sets useraddr");
  endtask
endmodule
