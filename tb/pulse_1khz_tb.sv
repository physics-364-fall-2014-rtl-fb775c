// pulse_1khz_tb: checks the time base at its full default rate: after reset
// the first pulse comes 999 clocks after reset is released (the counter
// holds 0 on the last reset clock), then it is one clock wide and repeats
// exactly every 1000 clocks.
module pulse_1khz_tb;
  logic clock = 0, reset = 1, pulse_1kHz;
  int checks = 0, failures = 0;
  pulse_1khz dut (.*);
  always #5 clock = ~clock;

  initial begin
    repeat (50000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last, n, t;
    last = -1; n = 0; t = 0;
    repeat (2) @(negedge clock);
    reset = 0;
    while (n < 20) begin
      @(negedge clock);
      t++;
      if (pulse_1kHz) begin
        checks++;
        if (last < 0) begin
          if (t != 999) begin failures++; $display("FAIL first pulse at %0d", t); end
        end else if (t - last != 1000) begin
          failures++; $display("FAIL period %0d", t - last);
        end
        last = t; n++;
        @(negedge clock); t++;
        checks++;
        if (pulse_1kHz) begin failures++; $display("FAIL pulse wider than one clock"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
