// basic_cpu_board: the little computer on the FPGA board with no front
// panel: simple_cpu, its 256 x 16 RAM and the 4-digit display. It runs
// whatever program the RAM powers up with, by default the prime-number
// program, and shows the OUT register, i.e. the most recent prime.
//
// Controls: sw[0] up pauses the CPU (it is the CPU's run enable, run =
// !sw[0]); holding btn[1] resets the CPU (synchronous, through the CPU's
// reset input), which restarts the program from address 0. The green LEDs
// show the Program Counter. The display shows the OUT register as four hex
// digits, which the prime program fills with BCD, so the primes read in
// decimal. The decimal points are off. The other buttons and switches are
// unused. All control, LED and display wiring acts on the same clock.
//
// This is the plain version of the computer that cpu_board extends with
// the debug panel. Its wiring (run from sw[0], reset from btn[1], LEDs =
// PC, display = OUT) follows the lab description. The buttons drive the
// CPU directly, with no synchronizer, as there; they are assumed debounced
// and synchronous to the clock. The display driver settings are this
// design's choice.
module basic_cpu_board #(
  parameter string       INIT_FILE = "rtl/prime_asm.hex",
  parameter int unsigned SCAN_BITS = 10
) (
  input  logic       clock,
  input  logic [3:0] btn,
  input  logic [7:0] sw,
  output logic [7:0] led,
  output logic [6:0] seg,
  output logic       dp,
  output logic [3:0] an
);

  logic [15:0] memory_dataout, memory_datain, IR, AC, out;
  logic [7:0]  PC, memory_addr;
  logic [3:0]  state;
  logic        memory_write;

  simple_cpu cpu (
    .clock, .reset(btn[1]), .run(!sw[0]),
    .memory_dataout, .memory_addr, .memory_datain, .memory_write,
    .PC, .AC, .IR, .state, .out
  );

  ram256x16 #(.INIT_FILE(INIT_FILE)) ram (
    .clock, .writeenable(memory_write), .address(memory_addr),
    .datain(memory_datain), .dataout(memory_dataout)
  );

  assign led = PC;

  display_digits #(.SCAN_BITS(SCAN_BITS)) disp (
    .clock, .digits(out), .dots(4'b0000), .seg, .dp, .an
  );

endmodule
