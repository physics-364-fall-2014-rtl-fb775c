// cpu_board: the complete little computer on the FPGA board: simple_cpu,
// its 256 x 16 RAM, the cpu_debug front panel and the display.
//
// The RAM port is the CPU's, except in MEMORY mode, when the panel owns it
// (address useraddr, its merged write word and write pulse). The green LEDs
// show PC (useraddr in MEMORY mode). The 4-digit display shows, in the first
// matching case:
//   MEMORY mode     mem[useraddr], or useraddr while btn[0] is held
//   sw[7] up        {PC, memory address}
//   sw[6] up        IR
//   sw[5] up        RAM read data
//   sw[4] up        AC
//   sw[3] up        FSM state number (right-hand digit)
//   otherwise       the OUT register (the program's output)
// The decimal points show the mode: dot 0 lit for RUN, dot 1 for BREAK,
// dot 2 for STEP, dot 3 for MEMORY. display_value is the 16-bit value on the
// display, brought out as well so it can be observed without decoding the
// multiplexed segments.
//
// The RAM powers up with INIT_FILE (default: the prime-number program). All
// of the above follows the lab description; 'por' (power-on reset of the
// panel), display_value and the exact display of the address while btn[0]
// is held (as 00aa) are this design's.
module cpu_board
  import lab27_pkg::*;
#(
  parameter string       INIT_FILE = "rtl/prime_asm.hex",
  parameter int unsigned SCAN_BITS = 10
) (
  input  logic        clock,
  input  logic        por,
  input  logic [3:0]  btn,
  input  logic [7:0]  sw,
  output logic [7:0]  led,
  output logic [6:0]  seg,
  output logic        dp,
  output logic [3:0]  an,
  output logic [15:0] display_value
);

  logic [15:0] memory_dataout, memory_datain, cpu_datain, IR, AC, out, mon_datain;
  logic [7:0]  PC, memory_addr, cpu_addr, useraddr;
  logic [3:0]  state;
  logic        memory_write, cpu_write, run, cpu_reset, mon_active, mon_write, btn0_held;
  dbg_mode_e   mode;

  simple_cpu cpu (
    .clock, .reset(cpu_reset), .run,
    .memory_dataout, .memory_addr(cpu_addr), .memory_datain(cpu_datain),
    .memory_write(cpu_write), .PC, .AC, .IR, .state, .out
  );

  assign memory_addr   = mon_active ? useraddr   : cpu_addr;
  assign memory_datain = mon_active ? mon_datain : cpu_datain;
  assign memory_write  = mon_active ? mon_write  : cpu_write;

  ram256x16 #(.INIT_FILE(INIT_FILE)) ram (
    .clock, .writeenable(memory_write), .address(memory_addr),
    .datain(memory_datain), .dataout(memory_dataout)
  );

  cpu_debug panel (
    .clock, .por, .btn, .sw, .cpu_state(state), .cpu_pc(PC),
    .mem_dataout(memory_dataout), .mode, .cpu_run(run), .cpu_reset,
    .useraddr, .mon_active, .mon_write, .mon_datain, .btn0_held
  );

  always_comb begin
    if (mon_active)  display_value = btn0_held ? {8'h00, useraddr} : memory_dataout;
    else if (sw[7])  display_value = {PC, memory_addr};
    else if (sw[6])  display_value = IR;
    else if (sw[5])  display_value = memory_dataout;
    else if (sw[4])  display_value = AC;
    else if (sw[3])  display_value = {12'h000, state};
    else             display_value = out;
  end

  assign led = mon_active ? useraddr : PC;

  display_digits #(.SCAN_BITS(SCAN_BITS)) disp (
    .clock, .digits(display_value), .dots(4'b0001 << mode), .seg, .dp, .an
  );

endmodule
