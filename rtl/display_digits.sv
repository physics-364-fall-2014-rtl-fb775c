// display_digits: drives a 4-digit, common-anode, multiplexed 7-segment
// display from four hex digits and four decimal points.
//
// A free-running counter of SCAN_BITS+2 bits selects one digit at a time; its
// top two bits are the digit index, so each digit is lit for 2**SCAN_BITS
// clocks in turn (about 1 ms per digit for a 1 MHz clock at the default).
// Outputs are active low, as the board's display needs: an[i] low enables
// digit i (digit 0 is the right-hand one), seg[0..6] low lights segment
// a..g, dp low lights the decimal point. The digit value is decoded as
// hexadecimal (0-9, A, b, C, d, E, F).
//
// The lab names this display module and what each design shows on it; the
// scan scheme, polarity and segment order here are this design's choices for
// a common-anode board display.
module display_digits #(
  parameter int unsigned SCAN_BITS = 10
) (
  input  logic            clock,
  input  logic [3:0][3:0] digits,  // digits[0] is the right-hand digit
  input  logic [3:0]      dots,    // dots[0] is the right-hand point
  output logic [6:0]      seg,     // {g,f,e,d,c,b,a}, active low
  output logic            dp,      // active low
  output logic [3:0]      an       // digit enables, active low
);

  logic [SCAN_BITS+1:0] scan;  // free running; its start value does not matter
  logic [1:0] sel;

  always_ff @(posedge clock) scan <= scan + 1'b1;
  assign sel = scan[SCAN_BITS+1 -: 2];

  // segments lit (active high) for a hex value, bit 0 = a ... bit 6 = g
  function automatic logic [6:0] hex7(input logic [3:0] v);
    unique case (v)
      4'h0: return 7'b011_1111;
      4'h1: return 7'b000_0110;
      4'h2: return 7'b101_1011;
      4'h3: return 7'b100_1111;
      4'h4: return 7'b110_0110;
      4'h5: return 7'b110_1101;
      4'h6: return 7'b111_1101;
      4'h7: return 7'b000_0111;
      4'h8: return 7'b111_1111;
      4'h9: return 7'b110_1111;
      4'hA: return 7'b111_0111;
      4'hB: return 7'b111_1100;
      4'hC: return 7'b011_1001;
      4'hD: return 7'b101_1110;
      4'hE: return 7'b111_1001;
      default: return 7'b111_0001;  // F
    endcase
  endfunction

  always_comb begin
    seg = ~hex7(digits[sel]);
    dp  = ~dots[sel];
    an  = ~(4'b0001 << sel);
  end

endmodule
