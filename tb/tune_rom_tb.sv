// tune_rom_tb: walks each tune in the ROM the way the music machine does
// (pairs of words, GOTO on a zero duration) and checks it against the note
// list written here: the notes of "Mary Had a Little Lamb", the pips and the
// opening of Invention 13, each ending in a GOTO to its own start. Every
// word outside the three tunes must read 0.
module tune_rom_tb;
  logic [7:0] address;
  logic [15:0] dataout;
  int checks = 0, failures = 0;
  tune_rom dut (.*);

  // half-periods (us) of the white keys from middle C
  localparam int C4 = 1911, D4 = 1703, E4 = 1517, G4 = 1276;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at address %0d: %0d", what, address, dataout); end
  endtask

  task automatic walk(input int start, input int durs[], input int hps[]);
    int a = start;
    foreach (durs[n]) begin
      address = 8'(a);     #1 check(int'(dataout) == durs[n], "duration");
      address = 8'(a + 1); #1 check(int'(dataout) == hps[n], "half-period");
      a += 2;
    end
    address = 8'(a);     #1 check(dataout == 0, "GOTO marker");
    address = 8'(a + 1); #1 check(int'(dataout) == start, "GOTO target");
  endtask

  initial begin
    walk(0, '{1000, 1000, 1000, 1000, 1000, 1000, 1000, 1000, 1000, 1000, 1000, 1000, 1500, 1000},
            '{E4, D4, C4, D4, E4, E4, E4, D4, D4, D4, E4, G4, G4, 0});
    walk(64, '{1000, 100, 900, 100, 900, 100, 900, 100, 900, 100, 900, 500, 4500},
             '{0, 500, 0, 500, 0, 500, 0, 500, 0, 500, 0, 500, 0});
    walk(96, '{125, 125, 125, 125, 125, 125, 125},
             '{0, 1516, 1136, 955, 1012, 1516, 1012});
    for (int a = 0; a < 256; a++) begin
      if ((a >= 0 && a < 30) || (a >= 64 && a < 92) || (a >= 96 && a < 112)) continue;
      address = 8'(a); #1 check(dataout == 0, "unused word");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
