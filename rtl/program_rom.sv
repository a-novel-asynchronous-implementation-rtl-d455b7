// program_rom: conventional single-rail program memory of 16-bit words.
//
// Two asynchronous read ports return the word at word index `addr` and the
// following word, so one fetch delivers both words of a two-word PIC18
// instruction (GOTO, CALL, MOVFF). Indices wrap at WORDS. A load port,
// written on the `clk` edge while ld_we is high, fills the memory before the
// processor is started; words never loaded read as 0 (NOP).
// WORDS must be a power of two.
// Following the original design: a conventional program memory read through
// converters. Own choices: its size, the second read port for two-word
// instructions, the load port.
module program_rom #(
  parameter int unsigned WORDS = 1024,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [15:0]   word0,
  output logic [15:0]   word1,
  input  logic          ld_we,
  input  logic [AW-1:0] ld_addr,
  input  logic [15:0]   ld_data
);
  logic [15:0] mem [WORDS];
  logic [AW-1:0] addr1;

  initial for (int i = 0; i < WORDS; i++) mem[i] = 16'h0000;

  always_ff @(posedge clk) if (ld_we) mem[ld_addr] <= ld_data;

  assign addr1 = addr + 1'b1;
  assign word0 = mem[addr];
  assign word1 = mem[addr1];
endmodule
