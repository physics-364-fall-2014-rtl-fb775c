// lab27_pkg: state encodings and opcodes shared by the two machines in this
// design, the ROM-driven music machine (playerpiano) and the accumulator
// computer (simple_cpu).
//
// The state numbers are the ones the design was specified with, because they
// are visible to a user: the 7-segment display shows the state number of
// either machine. The opcode numbers are the CPU's machine-code format (upper
// byte of an instruction word).
package lab27_pkg;

  // ---------------------------------------------------------------- music
  typedef enum logic [2:0] {
    PP_START      = 3'd0,  // reset / stopped: go back to address 0
    PP_FETCHDURA  = 3'd1,  // latch note duration (ms) from the ROM
    PP_FETCHPITCH = 3'd2,  // latch note half-period (us) from the ROM
    PP_GOTO       = 3'd3,  // duration was 0: jump to address 'halfperiod'
    PP_WIGGLE0    = 3'd4,  // speaker pin LOW for one half-period
    PP_WIGGLE1    = 3'd5,  // speaker pin HIGH for one half-period
    PP_NOTEDONE   = 3'd6,  // note finished
    PP_NOTEGAP    = 3'd7   // short silence before the next note
  } pp_state_e;

  // ---------------------------------------------------------------- CPU
  typedef enum logic [3:0] {
    CPU_RESET  = 4'd0,
    CPU_FETCH  = 4'd1,
    CPU_DECODE = 4'd2,
    CPU_LOAD   = 4'd3,   // AC := mem[arg]
    CPU_STORE  = 4'd4,   // mem[arg] := AC
    CPU_STORE2 = 4'd5,   // extra cycle after a store
    CPU_JUMP   = 4'd6,   // PC := arg
    CPU_JUMPZ  = 4'd7,   // if (AC == 0) PC := arg
    CPU_JUMPN  = 4'd8,   // if (AC < 0)  PC := arg
    CPU_ADD    = 4'd9,   // AC := AC + mem[arg]
    CPU_SUB    = 4'd10,  // AC := AC - mem[arg]
    CPU_MUL    = 4'd11,  // AC := sat16(AC * mem[arg])
    CPU_OUT    = 4'd12,  // OUT := AC
    CPU_JUMPNZ = 4'd13   // if (AC != 0) PC := arg
  } cpu_state_e;

  // Opcodes: instruction bits [15:8]. Any other value is a no-op.
  localparam logic [7:0] OP_LOAD   = 8'h00;
  localparam logic [7:0] OP_STORE  = 8'h01;
  localparam logic [7:0] OP_JUMP   = 8'h02;
  localparam logic [7:0] OP_JUMPZ  = 8'h03;
  localparam logic [7:0] OP_JUMPN  = 8'h04;
  localparam logic [7:0] OP_ADD    = 8'h05;
  localparam logic [7:0] OP_SUB    = 8'h06;
  localparam logic [7:0] OP_MUL    = 8'h07;
  localparam logic [7:0] OP_OUT    = 8'h08;
  localparam logic [7:0] OP_JUMPNZ = 8'h09;

  // Debug modes of the computer's front panel.
  typedef enum logic [1:0] {
    MODE_RUN    = 2'd0,  // free running
    MODE_BREAK  = 2'd1,  // pause after OUT and at PC == useraddr
    MODE_STEP   = 2'd2,  // pause at DECODE (or every clock with sw[0] up)
    MODE_MEMORY = 2'd3   // CPU idle, RAM inspected / edited by hand
  } dbg_mode_e;

endpackage
