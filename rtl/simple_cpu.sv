// simple_cpu: a 16-bit accumulator computer with an 8-bit address space.
//
// Every instruction is one 16-bit word: the upper byte is the opcode, the
// lower byte the argument, which is a RAM address for LOAD, STORE, ADD, SUB
// and MUL and a jump target for the four jumps. The machine is a finite-state
// machine that walks FETCH -> DECODE -> <execute state> -> FETCH:
//   FETCH   IR := mem[PC], PC := PC + 1
//   DECODE  choose the execute state from IR[15:8] (an unknown opcode goes
//           straight back to FETCH, i.e. acts as a no-op)
//   LOAD/ADD/SUB/MUL update AC from mem[IR[7:0]]; STORE writes AC to
//   mem[IR[7:0]] and is followed by STORE2; JUMP/JUMPZ/JUMPN/JUMPNZ load PC
//   from IR[7:0] (conditionally on AC == 0, AC[15], AC != 0); OUT copies AC
//   to the OUT register.
// So an instruction takes 3 clocks, a STORE 4. MUL is a single-cycle
// combinational multiplier; a product above 16'hFFFF saturates to 16'hFFFF.
//
// Memory interface: the RAM is read combinationally. memory_addr is PC in
// FETCH and IR[7:0] in every other state; memory_write is high in STORE
// (held low while reset is asserted, so a power-up state cannot write) with
// memory_datain = AC.
//
// 'run' is the clock enable of every register (state, PC, AC, IR, OUT): with
// run low the machine freezes. 'reset' is synchronous and acts whether or not
// run is high: it puts the FSM in RESET, where the next enabled clock clears
// AC and PC. IR and OUT are also cleared by reset (this design's choice, so
// that nothing undefined is ever displayed).
//
// The state list, opcode numbers, register update rules and saturation all
// follow the lab description; resetting IR/OUT and holding memory_write
// low during reset are this design's choices.
module simple_cpu
  import lab27_pkg::*;
(
  input  logic        clock,
  input  logic        reset,
  input  logic        run,
  input  logic [15:0] memory_dataout,
  output logic [7:0]  memory_addr,
  output logic [15:0] memory_datain,
  output logic        memory_write,
  output logic [7:0]  PC,
  output logic [15:0] AC,
  output logic [15:0] IR,
  output logic [3:0]  state,
  output logic [15:0] out
);

  cpu_state_e st, st_next;
  logic [7:0] opcode;
  logic [7:0] arg;
  logic [31:0] full_product;
  logic [15:0] product;

  assign opcode = IR[15:8];
  assign arg    = IR[7:0];
  assign state  = st;

  // ------------------------------------------------------------ next state
  always_comb begin
    st_next = CPU_FETCH;
    if (reset) st_next = CPU_RESET;
    else begin
      unique case (st)
        CPU_FETCH:  st_next = CPU_DECODE;
        CPU_DECODE: begin
          case (opcode)
            OP_LOAD:   st_next = CPU_LOAD;
            OP_STORE:  st_next = CPU_STORE;
            OP_JUMP:   st_next = CPU_JUMP;
            OP_JUMPZ:  st_next = CPU_JUMPZ;
            OP_JUMPN:  st_next = CPU_JUMPN;
            OP_JUMPNZ: st_next = CPU_JUMPNZ;
            OP_ADD:    st_next = CPU_ADD;
            OP_SUB:    st_next = CPU_SUB;
            OP_MUL:    st_next = CPU_MUL;
            OP_OUT:    st_next = CPU_OUT;
            default:   st_next = CPU_FETCH;
          endcase
        end
        CPU_STORE:  st_next = CPU_STORE2;
        default:    st_next = CPU_FETCH;
      endcase
    end
  end

  always_ff @(posedge clock) begin
    if (reset)    st <= CPU_RESET;
    else if (run) st <= st_next;
  end

  // ------------------------------------------------------------ memory port
  assign memory_addr   = (st == CPU_FETCH) ? PC : arg;
  assign memory_write  = (st == CPU_STORE) && !reset;
  assign memory_datain = AC;

  // ------------------------------------------------------------ IR
  always_ff @(posedge clock) begin
    if (reset)                          IR <= '0;
    else if (run && st == CPU_FETCH)    IR <= memory_dataout;
  end

  // ------------------------------------------------------------ PC
  logic pc_load;
  always_comb begin
    unique case (st)
      CPU_RESET, CPU_FETCH, CPU_JUMP: pc_load = 1'b1;
      CPU_JUMPZ:  pc_load = (AC == 16'd0);
      CPU_JUMPNZ: pc_load = (AC != 16'd0);
      CPU_JUMPN:  pc_load = AC[15];
      default:    pc_load = 1'b0;
    endcase
  end

  always_ff @(posedge clock) begin
    if (reset) PC <= '0;
    else if (run && pc_load) begin
      if (st == CPU_RESET)      PC <= '0;
      else if (st == CPU_FETCH) PC <= PC + 8'd1;
      else                      PC <= arg;
    end
  end

  // ------------------------------------------------------------ AC
  assign full_product = AC * memory_dataout;
  assign product      = (full_product > 32'h0000_FFFF) ? 16'hFFFF : full_product[15:0];

  always_ff @(posedge clock) begin
    if (reset) AC <= '0;
    else if (run) begin
      unique case (st)
        CPU_RESET: AC <= '0;
        CPU_LOAD:  AC <= memory_dataout;
        CPU_ADD:   AC <= AC + memory_dataout;
        CPU_SUB:   AC <= AC - memory_dataout;
        CPU_MUL:   AC <= product;
        default:   ;
      endcase
    end
  end

  // ------------------------------------------------------------ OUT
  always_ff @(posedge clock) begin
    if (reset)                     out <= '0;
    else if (run && st == CPU_OUT) out <= AC;
  end

endmodule
