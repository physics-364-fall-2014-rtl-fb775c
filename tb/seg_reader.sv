// seg_reader: testbench helper that reads a 4-digit multiplexed 7-segment
// display the way the eye does. On every falling clock edge it finds the one
// enabled digit (an[i] low, digit 0 on the right) and decodes its segments
// (active low, seg[0] = a ... seg[6] = g) back to a hex digit with its own
// table. 'value' is updated only once all four digits have stayed the same
// for SCAN_CLOCKS clocks (one whole scan), so a digit caught half-way
// through a change never shows. 'bad' goes high, and stays high, if a scan
// step lights no digit, several digits, or a pattern that is not a hex
// digit. 'value' starts at FFFF until the first stable scan.
module seg_reader #(
  parameter int SCAN_CLOCKS = 4096
) (
  input  logic        clock,
  input  logic [6:0]  seg,
  input  logic [3:0]  an,
  output logic [15:0] value,
  output logic        bad
);

  // lit segments (active high, bit 0 = a ... bit 6 = g) to a hex digit;
  // 16 = not a digit
  function automatic int unseg(input logic [6:0] lit);
    case (lit)
      7'h3f: return 0;  7'h06: return 1;  7'h5b: return 2;  7'h4f: return 3;
      7'h66: return 4;  7'h6d: return 5;  7'h7d: return 6;  7'h07: return 7;
      7'h7f: return 8;  7'h6f: return 9;  7'h77: return 10; 7'h7c: return 11;
      7'h39: return 12; 7'h5e: return 13; 7'h79: return 14; 7'h71: return 15;
      default: return 16;
    endcase
  endfunction

  logic [3:0] digit [4];
  int stable;

  initial begin
    for (int i = 0; i < 4; i++) digit[i] = 4'hF;
    value  = 16'hFFFF;
    bad    = 1'b0;
    stable = 0;
  end

  always @(negedge clock) begin
    automatic int idx = -1;
    automatic int v;
    for (int i = 0; i < 4; i++) if (!an[i]) idx = (idx == -1) ? i : 9;
    if (idx >= 0 && idx < 4) begin
      v = unseg(~seg);
      if (v == 16) bad = 1'b1;
      else if (digit[idx] != 4'(v)) begin digit[idx] = 4'(v); stable = 0; end
      else stable++;
    end else begin
      bad = 1'b1;
    end
    if (stable >= SCAN_CLOCKS) value = {digit[3], digit[2], digit[1], digit[0]};
  end

endmodule
