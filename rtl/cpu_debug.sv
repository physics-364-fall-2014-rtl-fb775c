// cpu_debug: front-panel debug controller for simple_cpu.
//
// It owns the computer's four operating modes, rotated by pressing btn[3]
// (MODE_RUN -> MODE_BREAK -> MODE_STEP -> MODE_MEMORY -> MODE_RUN):
//   RUN     the CPU runs freely; sw[0] up pauses it; btn[1] resets it.
//   BREAK   as RUN, but the CPU pauses in FETCH right after every OUT
//           instruction and in FETCH whenever PC == useraddr (a
//           breakpoint), until btn[0] is pressed.
//   STEP    the CPU pauses in every DECODE until btn[0] is pressed (one
//           instruction per press); with sw[0] up it pauses on every clock
//           (one clock per press).
//   MEMORY  the CPU is stopped and the RAM belongs to the panel: btn[0]
//           steps useraddr by one (switches all down) or loads it from the
//           switches; btn[1] / btn[2] replace the low / high byte of
//           mem[useraddr] with the switches.
// In RUN, BREAK and STEP, btn[2] copies the switches into useraddr.
//
// Pausing works through the CPU's 'run' clock enable: run = base && (!brk
// || go), where brk is the pause condition of the mode for the CPU's
// present state and go is set by a btn[0] press while paused and cleared by
// the one enabled clock it releases.
//
// Buttons are assumed debounced; each passes a two-flop synchronizer and
// acts on its rising edge (btn[1] as CPU reset acts on its level). Timing:
// a press takes effect 3 clocks after the pin rises. mon_write is a
// one-clock pulse (never during por) with mon_datain = the merged word, to
// be applied to the RAM word at useraddr (the board routes the RAM port to
// useraddr in MEMORY mode). 'por' is a power-on reset of the panel state (mode RUN,
// useraddr 0) and also resets the CPU, so the program starts from address
// 0 at power-on, as the board's flip-flops do when the FPGA is configured.
//
// The modes, buttons and what they do follow the lab description; the
// synchronizers, the exact pause points (FETCH after an OUT, FETCH of the
// breakpoint instruction) and 'por' are this design's choices.
module cpu_debug
  import lab27_pkg::*;
(
  input  logic        clock,
  input  logic        por,          // power-on reset of the panel
  input  logic [3:0]  btn,
  input  logic [7:0]  sw,
  input  logic [3:0]  cpu_state,
  input  logic [7:0]  cpu_pc,
  input  logic [15:0] mem_dataout,  // RAM word at useraddr in MEMORY mode
  output dbg_mode_e   mode,
  output logic        cpu_run,
  output logic        cpu_reset,
  output logic [7:0]  useraddr,
  output logic        mon_active,   // RAM port belongs to the panel
  output logic        mon_write,
  output logic [15:0] mon_datain,
  output logic        btn0_held     // for the display: show the address
);

  logic [3:0] btn_meta, btn_sync, btn_prev, press;
  logic       after_out, go, brk, base_run;

  always_ff @(posedge clock) begin
    btn_meta <= btn;
    btn_sync <= btn_meta;
    btn_prev <= por ? 4'b0 : btn_sync;
  end
  assign press     = btn_sync & ~btn_prev;
  assign btn0_held = btn_sync[0];

  // ------------------------------------------------------------ mode, useraddr
  always_ff @(posedge clock) begin
    if (por) begin
      mode     <= MODE_RUN;
      useraddr <= '0;
    end else begin
      if (press[3]) mode <= dbg_mode_e'(mode + 2'd1);
      if (mode == MODE_MEMORY) begin
        if (press[0]) useraddr <= (sw == 8'd0) ? useraddr + 8'd1 : sw;
      end else if (press[2]) begin
        useraddr <= sw;
      end
    end
  end

  // ------------------------------------------------------------ memory monitor
  assign mon_active = (mode == MODE_MEMORY);
  always_comb begin
    mon_write  = 1'b0;
    mon_datain = mem_dataout;
    if (mode == MODE_MEMORY && !press[3] && !por) begin
      if (press[1]) begin
        mon_write  = 1'b1;
        mon_datain = {mem_dataout[15:8], sw};
      end else if (press[2]) begin
        mon_write  = 1'b1;
        mon_datain = {sw, mem_dataout[7:0]};
      end
    end
  end

  // ------------------------------------------------------------ run control
  always_comb begin
    unique case (mode)
      MODE_RUN:    begin base_run = !sw[0]; brk = 1'b0; end
      MODE_BREAK:  begin
        base_run = !sw[0];
        brk = (cpu_state == 4'(CPU_FETCH)) && (after_out || cpu_pc == useraddr);
      end
      MODE_STEP:   begin base_run = 1'b1; brk = sw[0] || cpu_state == 4'(CPU_DECODE); end
      default:     begin base_run = 1'b0; brk = 1'b0; end
    endcase
  end

  assign cpu_run   = base_run && (!brk || go);
  assign cpu_reset = por || (btn_sync[1] && mode != MODE_MEMORY);

  always_ff @(posedge clock) begin
    if (por || press[3]) go <= 1'b0;
    else if (press[0] && brk && !go) go <= 1'b1;
    else if (cpu_run && brk) go <= 1'b0;
  end

  // remembers that the last executed instruction was OUT
  always_ff @(posedge clock) begin
    if (por || cpu_reset)                                 after_out <= 1'b0;
    else if (cpu_run && cpu_state == 4'(CPU_OUT))         after_out <= 1'b1;
    else if (cpu_run && cpu_state == 4'(CPU_FETCH))       after_out <= 1'b0;
  end

endmodule
