// display_digits_tb: drives random digits and dots, follows the scan, and for
// every clock decodes the lit segments back to a value with an independent
// table (segment patterns written out per hex digit), checking that exactly
// one anode is active, that the scan visits every digit, and that each digit
// stays lit for 2**SCAN_BITS clocks.
module display_digits_tb;
  localparam int SB = 3;
  logic clock = 0;
  logic [3:0][3:0] digits;
  logic [3:0] dots;
  logic [6:0] seg;
  logic dp;
  logic [3:0] an;
  int checks = 0, failures = 0;
  int visits[4];

  display_digits #(.SCAN_BITS(SB)) dut (.*);
  always #5 clock = ~clock;

  // segment patterns, "abcdefg" order as strings of lit segments
  function automatic string pattern(input logic [3:0] v);
    string p[16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                     "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};
    return p[v];
  endfunction

  function automatic string lit(input logic [6:0] s);
    string r = "";
    string names = "abcdefg";
    for (int i = 0; i < 7; i++) if (!s[i]) r = {r, names.substr(i, i)};
    return r;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL t=%0t %s an=%b seg=%b", $time, what, an, seg); end
  endtask

  initial begin
    repeat (100000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int idx, prev_idx, dwell;
    digits = '0; dots = '0;
    prev_idx = -1; dwell = 0;
    for (int round = 0; round < 200; round++) begin
      digits = 16'($urandom); dots = 4'($urandom);
      repeat (4 * (1 << SB)) begin
        @(negedge clock);
        idx = -1;
        for (int i = 0; i < 4; i++) if (!an[i]) idx = (idx == -1) ? i : 9;
        check(idx >= 0 && idx < 4, "exactly one digit enabled");
        if (idx >= 0 && idx < 4) begin
          visits[idx]++;
          check(lit(seg) == pattern(digits[idx]), "segment pattern");
          check(dp == !dots[idx], "decimal point");
          if (idx == prev_idx) dwell++;
          else begin
            if (prev_idx != -1 && round > 0) check(dwell == (1 << SB), "digit dwell time");
            dwell = 1;
          end
          prev_idx = idx;
        end
      end
    end
    for (int i = 0; i < 4; i++) check(visits[i] > 0, "digit visited");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
