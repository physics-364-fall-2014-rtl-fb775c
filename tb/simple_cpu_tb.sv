// simple_cpu_tb: checks simple_cpu against an instruction-level reference
// model written in this testbench.
//
// The RAM is modelled here (combinational read, write on the clock edge). A
// program of random instruction words, including undefined opcodes, runs on
// the CPU while 'run' is dropped at random. Each time the CPU enters FETCH
// with run high, PC, AC and OUT are compared with the model, which has
// executed exactly the instructions the CPU completed, and the number of
// enabled clocks the last instruction took is checked (3, 4 for STORE, 2
// for an undefined opcode).
// A directed program then checks MUL saturation and the jump conditions.
// At the end the RAM images of CPU and model must be equal.
module simple_cpu_tb;
  import lab27_pkg::*;

  logic clock = 0, reset = 1, run = 0;
  logic [15:0] memory_dataout, memory_datain, AC, IR, out;
  logic [7:0]  memory_addr, PC;
  logic        memory_write;
  logic [3:0]  state;

  int checks = 0, failures = 0;
  int n_op[16];
  int n_sat = 0, n_pause = 0;

  simple_cpu dut (.*);

  logic [15:0] dmem [256];   // the CPU's RAM
  logic [15:0] mmem [256];   // the model's RAM
  assign memory_dataout = dmem[memory_addr];
  always_ff @(posedge clock) if (memory_write) dmem[memory_addr] <= memory_datain;

  always #5 clock = ~clock;

  // reference model state
  logic [7:0]  m_pc;
  logic [15:0] m_ac, m_out;
  int          m_cycles;      // enabled clocks the last instruction needs
  int          cyc;           // enabled clocks since the last FETCH
  bit          started;

  task automatic model_step();
    logic [15:0] ir; logic [7:0] op, a; logic [31:0] p;
    ir = mmem[m_pc]; m_pc = m_pc + 8'd1; op = ir[15:8]; a = ir[7:0];
    m_cycles = 3;
    case (op)
      8'h00: m_ac = mmem[a];
      8'h01: begin mmem[a] = m_ac; m_cycles = 4; end
      8'h02: m_pc = a;
      8'h03: if (m_ac == 0) m_pc = a;
      8'h04: if (m_ac[15]) m_pc = a;
      8'h05: m_ac = m_ac + mmem[a];
      8'h06: m_ac = m_ac - mmem[a];
      8'h07: begin p = m_ac * mmem[a]; if (p > 32'hffff) n_sat++; m_ac = (p > 32'hffff) ? 16'hffff : p[15:0]; end
      8'h08: m_out = m_ac;
      8'h09: if (m_ac != 0) m_pc = a;
      default: m_cycles = 2;   // undefined opcode: FETCH, DECODE only
    endcase
    n_op[op > 8'd9 ? 10 : int'(op)]++;
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t %s: PC=%h/%h AC=%h/%h OUT=%h/%h cyc=%0d/%0d",
                                  $time, what, PC, m_pc, AC, m_ac, out, m_out, cyc, m_cycles);
    end
  endtask

  // compare at every instruction boundary
  always @(posedge clock) begin
    if (!reset && run) begin
      cyc++;
      if (state == 4'(CPU_FETCH)) begin
        if (started) begin
          check(PC == m_pc && AC == m_ac && out == m_out, "registers at FETCH");
          check(cyc - 1 == m_cycles, "instruction cycle count");
        end else begin
          check(PC == 0 && AC == 0, "state after reset");
        end
        started = 1;
        cyc = 1;
        model_step();
      end
    end
  end

  task automatic restart();
    reset = 1; run = 0;
    repeat (2) @(negedge clock);
    m_pc = 0; m_ac = 0; m_out = 0; started = 0; cyc = 0;
    reset = 0;
  endtask

  initial begin
    // watchdog
    repeat (400000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // ---- random programs
    for (int prog = 0; prog < 20; prog++) begin
      for (int a = 0; a < 256; a++) begin
        logic [15:0] w;
        w = {8'($urandom_range(0, 11)), 8'($urandom)};
        if (a >= 192) w = 16'($urandom);           // data area: any value
        if (a >= 192 && a < 200) w = 16'($urandom_range(0, 3)); // small values
        dmem[a] = w; mmem[a] = w;
      end
      restart();
      for (int t = 0; t < 6000; t++) begin
        run = ($urandom_range(0, 9) != 0);
        if (!run) n_pause++;
        @(negedge clock);
      end
      // stop at an instruction boundary, where CPU and model agree on RAM
      run = 1;
      do @(negedge clock); while (state != 4'(CPU_FETCH));
      run = 0;
      @(negedge clock);
      for (int a = 0; a < 256; a++) check(dmem[a] == mmem[a], "RAM image");
    end

    // ---- directed: saturation and all jump conditions
    for (int a = 0; a < 256; a++) dmem[a] = 16'h0000;
    // 0:load 80  1:mul 81 -> 300*300 saturates   2:out
    // 3:load 82  4:mul 82 -> 200*200=40000        5:out
    // 6:sub 83 (AC-40000=0) 7:jumpz 9  8:out(skipped)  9:sub 84 (AC=-1)
    // 10:jumpn 12  11:out (skipped)  12:jumpnz 14 13:out (skipped) 14:out 15:jump 15
    dmem[0] = 16'h0080; dmem[1] = 16'h0781; dmem[2] = 16'h0800;
    dmem[3] = 16'h0082; dmem[4] = 16'h0782; dmem[5] = 16'h0800;
    dmem[6] = 16'h0683; dmem[7] = 16'h0309; dmem[8] = 16'h0800;
    dmem[9] = 16'h0684; dmem[10] = 16'h040c; dmem[11] = 16'h0800;
    dmem[12] = 16'h090e; dmem[13] = 16'h0800; dmem[14] = 16'h0800; dmem[15] = 16'h020f;
    dmem[8'h80] = 300; dmem[8'h81] = 300; dmem[8'h82] = 200; dmem[8'h83] = 40000; dmem[8'h84] = 1;
    for (int a = 0; a < 256; a++) mmem[a] = dmem[a];
    restart();
    run = 1;
    wait (state == 4'(CPU_OUT)); @(posedge clock); @(negedge clock);
    check(out == 16'hffff, "MUL saturates to FFFF");
    wait (state == 4'(CPU_FETCH)); wait (state == 4'(CPU_OUT)); @(posedge clock); @(negedge clock);
    check(out == 16'd40000, "MUL 200*200");
    repeat (60) @(negedge clock);
    check(PC == 8'h0f || PC == 8'h10, "conditional jumps taken");
    check(out == 16'hffff, "final OUT is AC=-1");

    for (int op = 0; op <= 10; op++) check(n_op[op] > 0, $sformatf("opcode %0d executed", op));
    check(n_sat > 0, "saturation happened");
    check(n_pause > 0, "run low happened");
    $display("ops: %p sat=%0d pauses=%0d", n_op, n_sat, n_pause);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
