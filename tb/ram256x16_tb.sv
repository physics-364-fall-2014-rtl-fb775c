// ram256x16_tb: checks the RAM's power-up image (the prime-number program)
// at words whose values are fixed by the program listing, then random writes
// and reads against a reference array: a write lands on the clock edge only
// when writeenable is high, and the read is combinational.
module ram256x16_tb;
  logic clock = 0, writeenable = 0;
  logic [7:0] address = 0;
  logic [15:0] datain = 0, dataout;
  logic [15:0] ref_mem [256];
  int checks = 0, failures = 0;

  ram256x16 dut (.*);
  always #5 clock = ~clock;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s addr=%h data=%h", what, address, dataout); end
  endtask

  initial begin
    repeat (100000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // power-up contents
    automatic logic [7:0]  a_list[8] = '{8'h00, 8'h07, 8'h19, 8'h1f, 8'h5c, 8'h5e, 8'h6d, 8'h70};
    automatic logic [15:0] d_list[8] = '{16'h006e, 16'h045c, 16'h0761, 16'h005d, 16'h0200, 16'h0001, 16'h270f, 16'h0300};
    foreach (a_list[n]) begin
      address = a_list[n]; #1;
      check(dataout == d_list[n], "power-up word");
    end
    // capture the whole image as the reference
    for (int a = 0; a < 256; a++) begin address = 8'(a); #1; ref_mem[a] = dataout; end
    @(negedge clock);
    for (int t = 0; t < 4000; t++) begin
      address = 8'($urandom); datain = 16'($urandom); writeenable = $urandom_range(0, 1) == 1;
      #1 check(dataout == ref_mem[address], "read before edge");
      @(posedge clock);
      if (writeenable) ref_mem[address] = datain;
      @(negedge clock);
      check(dataout == ref_mem[address], "read after edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
