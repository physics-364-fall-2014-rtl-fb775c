// tune_rom: 256 x 16 read-only memory holding the music machine's tunes.
//
// Each note takes two words: the duration in milliseconds at an even address
// and the half-period in microseconds at the following odd address. A
// half-period of 0 is a rest (silence for the duration). A duration of 0 is a
// GOTO: the next word is the address to continue from. Every unused word is
// 0, so an unused pair is "GOTO 0".
//
// Contents (addresses in decimal):
//   0-29   "Mary Had a Little Lamb" (E D C D E E E D D D E G G), a 1 s rest,
//          then GOTO 0.
//   64-91  the Greenwich time signal ("pips"): five 100 ms, 1 kHz pips one
//          second apart, a 500 ms final pip, a 4.5 s silence, GOTO 64.
//   96-111 the opening of the right-hand part of Bach's Invention 13, then
//          GOTO 96.
// Half-periods are the rounded values of 1/(2f) for the white keys from
// middle C (C 1911, D 1703, E 1517, F 1432, G 1276, A 1136, B 1012, C 956 us).
//
// Purely combinational: 'dataout' follows 'address' with no clock. The word
// layout and the listed words follow the lab description; the GOTO words that
// close the first and third tunes (addresses 28-29 and 110-111) and the rest
// word at address 65 are this design's reading of the passages that are not
// listed.
module tune_rom (
  input  logic [7:0]  address,
  output logic [15:0] dataout
);

  always_comb begin
    unique case (address)
      // ---- Mary Had a Little Lamb: {duration, half-period}
      8'd0:   dataout = 16'd1000;  8'd1:   dataout = 16'd1517;  // E
      8'd2:   dataout = 16'd1000;  8'd3:   dataout = 16'd1703;  // D
      8'd4:   dataout = 16'd1000;  8'd5:   dataout = 16'd1911;  // C
      8'd6:   dataout = 16'd1000;  8'd7:   dataout = 16'd1703;  // D
      8'd8:   dataout = 16'd1000;  8'd9:   dataout = 16'd1517;  // E
      8'd10:  dataout = 16'd1000;  8'd11:  dataout = 16'd1517;  // E
      8'd12:  dataout = 16'd1000;  8'd13:  dataout = 16'd1517;  // E
      8'd14:  dataout = 16'd1000;  8'd15:  dataout = 16'd1703;  // D
      8'd16:  dataout = 16'd1000;  8'd17:  dataout = 16'd1703;  // D
      8'd18:  dataout = 16'd1000;  8'd19:  dataout = 16'd1703;  // D
      8'd20:  dataout = 16'd1000;  8'd21:  dataout = 16'd1517;  // E
      8'd22:  dataout = 16'd1000;  8'd23:  dataout = 16'd1276;  // G
      8'd24:  dataout = 16'd1500;  8'd25:  dataout = 16'd1276;  // G
      8'd26:  dataout = 16'd1000;  8'd27:  dataout = 16'd0;     // rest 1 s
      8'd28:  dataout = 16'd0;     8'd29:  dataout = 16'd0;     // GOTO 0
      // ---- Greenwich time signal
      8'd64:  dataout = 16'd1000;  8'd65:  dataout = 16'd0;     // rest 1 s
      8'd66:  dataout = 16'd100;   8'd67:  dataout = 16'd500;   // pip :55
      8'd68:  dataout = 16'd900;   8'd69:  dataout = 16'd0;
      8'd70:  dataout = 16'd100;   8'd71:  dataout = 16'd500;   // pip :56
      8'd72:  dataout = 16'd900;   8'd73:  dataout = 16'd0;
      8'd74:  dataout = 16'd100;   8'd75:  dataout = 16'd500;   // pip :57
      8'd76:  dataout = 16'd900;   8'd77:  dataout = 16'd0;
      8'd78:  dataout = 16'd100;   8'd79:  dataout = 16'd500;   // pip :58
      8'd80:  dataout = 16'd900;   8'd81:  dataout = 16'd0;
      8'd82:  dataout = 16'd100;   8'd83:  dataout = 16'd500;   // pip :59
      8'd84:  dataout = 16'd900;   8'd85:  dataout = 16'd0;
      8'd86:  dataout = 16'd500;   8'd87:  dataout = 16'd500;   // long pip :00
      8'd88:  dataout = 16'd4500;  8'd89:  dataout = 16'd0;
      8'd90:  dataout = 16'd0;     8'd91:  dataout = 16'd64;    // GOTO 64
      // ---- Invention 13, right hand (opening)
      8'd96:  dataout = 16'd125;   8'd97:  dataout = 16'd0;     // eighth rest
      8'd98:  dataout = 16'd125;   8'd99:  dataout = 16'd1516;  // E
      8'd100: dataout = 16'd125;   8'd101: dataout = 16'd1136;  // A
      8'd102: dataout = 16'd125;   8'd103: dataout = 16'd955;   // C
      8'd104: dataout = 16'd125;   8'd105: dataout = 16'd1012;  // B
      8'd106: dataout = 16'd125;   8'd107: dataout = 16'd1516;  // E
      8'd108: dataout = 16'd125;   8'd109: dataout = 16'd1012;  // B
      8'd110: dataout = 16'd0;     8'd111: dataout = 16'd96;    // GOTO 96
      default: dataout = 16'd0;
    endcase
  end

endmodule
