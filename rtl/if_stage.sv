// if_stage: instruction fetch stage of the asynchronous PIC18.
//
// The Read signal starts a fetch: while it is high the PC register's read
// port shows the PC as a dual-rail codeword, which is both passed on to the
// ID stage (for next-PC computation) and used as the address of the
// program-memory read interface. The instruction word at PC and the word
// after it come back as dual-rail data once the matched delay of the memory
// interface has expired. The output codeword {pc, word1, word0} goes to the
// IF/ID pipeline latch.
// Read is the inverse of that latch's acknowledge (gated by `run`): once the
// latch has captured the fetch its acknowledge drops Read, the PC read and
// the memory output return to null, and the stage is null. Read rises again
// when the latch has been emptied, which happens only after the ID stage has
// written the next PC, so every fetch sees the new PC.
// Following the original design: the Read signal, PC read, program ROM read
// through the converters, PC sent to ID, Read dropped by the latch
// acknowledge. Own choices: the run input and reading two words per fetch.
module if_stage
  import pic18_pkg::*;
#(
  parameter int unsigned MEM_DELAY = 4,
  parameter int unsigned ROM_AW    = 10
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 run,
  input  logic                 l1_ack,        // acknowledge of the IF/ID latch
  output logic                 pc_rd,         // read strobe to the PC register
  input  logic [PC_W-1:0]      pc_t,
  input  logic [PC_W-1:0]      pc_f,
  output logic [ROM_AW-1:0]    rom_addr,      // word index
  input  logic [31:0]          rom_rdata,     // {word at index+1, word at index}
  output logic [PC_W+31:0]     out_t,         // {pc, word1, word0}
  output logic [PC_W+31:0]     out_f
);
  logic [31:0] ins_t, ins_f;
  logic [PC_W-2:0] waddr;

  assign pc_rd = run & ~l1_ack;

  mem_read_if #(.AW(PC_W - 1), .DW(32), .DELAY(MEM_DELAY)) u_rom_if (
    .clk (clk), .rst (rst),
    .a_t (pc_t[PC_W-1:1]), .a_f (pc_f[PC_W-1:1]),
    .en_t (pc_rd), .en_f (1'b0),
    .mem_addr (waddr), .mem_rdata (rom_rdata),
    .d_t (ins_t), .d_f (ins_f)
  );
  assign rom_addr = waddr[ROM_AW-1:0];

  assign out_t = {pc_t, ins_t};
  assign out_f = {pc_f, ins_f};
endmodule
