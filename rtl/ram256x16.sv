// ram256x16: 256 words x 16 bits, the computer's single memory for both
// program and data.
//
// One port: 'address' selects the word, 'dataout' shows it combinationally
// (asynchronous read), and on a rising clock edge with 'writeenable' high the
// word is replaced by 'datain'; the new value shows on dataout after that
// edge. The power-up contents come from the hex file INIT_FILE (one 16-bit
// hex word per line, 256 lines), read relative to the simulator's working
// directory; an empty INIT_FILE leaves the memory cleared to zero.
//
// The organisation, read/write timing and file initialisation follow the lab
// description; the file name parameter and zero fill are this design's.
module ram256x16 #(
  parameter string INIT_FILE = "rtl/prime_asm.hex"
) (
  input  logic        clock,
  input  logic        writeenable,
  input  logic [7:0]  address,
  input  logic [15:0] datain,
  output logic [15:0] dataout
);

  logic [15:0] memory [256];

  initial begin
    for (int i = 0; i < 256; i++) memory[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, memory);
  end

  always_ff @(posedge clock) begin
    if (writeenable) memory[address] <= datain;
  end

  assign dataout = memory[address];

endmodule
