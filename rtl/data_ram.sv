// data_ram: conventional single-rail data memory, 16 banks of 256 bytes.
//
// One asynchronous read port (used by the operand-fetch stage), one write
// port written on the `clk` edge while we is high (used by the EX/WB stage),
// and an asynchronous debug read port for observation. Contents start at 0.
// Following the original design: 4 KB of data memory in 16 banks of 256
// bytes, a conventional memory. Own choices: asynchronous read, write on the
// time base, the debug port, zero initial contents.
module data_ram #(
  parameter int unsigned BYTES = 4096,
  localparam int unsigned AW   = $clog2(BYTES)
) (
  input  logic          clk,
  input  logic [AW-1:0] raddr,
  output logic [7:0]    rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [7:0]    wdata,
  input  logic [AW-1:0] dbg_addr,
  output logic [7:0]    dbg_data
);
  logic [7:0] mem [BYTES];

  initial for (int i = 0; i < BYTES; i++) mem[i] = 8'h00;

  always_ff @(posedge clk) if (we) mem[waddr] <= wdata;

  assign rdata    = mem[raddr];
  assign dbg_data = mem[dbg_addr];
endmodule
