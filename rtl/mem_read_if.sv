// mem_read_if: dual-rail read interface to a conventional (single-rail) memory.
//
// The request is a dual-rail codeword {en, addr}. A dual-rail to single-rail
// converter turns the address into the memory's address bus and its
// completion detector produces a strobe. The strobe runs through a matched
// delay longer than the memory access time; when the delayed strobe rises
// a single-rail to dual-rail converter drives the read data out as a
// dual-rail codeword, and when it falls (after the request returned to
// null) the output returns to null.
// The read data is captured while the address is complete and the delayed
// strobe has not yet risen, so the output codeword cannot change while the
// address returns to null. A request with en = 0 skips the memory (RAM
// control of the operand-fetch stage for mapped registers and literals) and
// answers at once with the value 0.
// Timing: valid output DELAY + 1 clk after the request is complete.
// Following the original design: converters, completion strobe and matched
// delay around a conventional memory. Own choices: the enable rail and
// holding the read data while the address is complete.
module mem_read_if #(
  parameter int unsigned AW    = 12,
  parameter int unsigned DW    = 8,
  parameter int unsigned DELAY = 4
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [AW-1:0] a_t,
  input  logic [AW-1:0] a_f,
  input  logic          en_t,
  input  logic          en_f,
  output logic [AW-1:0] mem_addr,
  input  logic [DW-1:0] mem_rdata,
  output logic [DW-1:0] d_t,
  output logic [DW-1:0] d_f
);
  logic          strobe, dly, complete;
  logic [DW-1:0] hold;
  logic [AW-1:0] addr_sr;
  logic          en_sr;

  dr_to_sr #(.W(AW + 1)) u_d2s (
    .clk (clk), .rst (rst), .d_t ({en_t, a_t}), .d_f ({en_f, a_f}),
    .d ({en_sr, addr_sr}), .strobe (strobe)
  );
  assign mem_addr = addr_sr;
  assign complete = (&(a_t | a_f)) & (en_t | en_f);

  matched_delay #(.DELAY(DELAY)) u_dly (
    .clk (clk), .rst (rst), .in (strobe & en_t), .out (dly)
  );

  always_ff @(posedge clk) begin
    if (rst)                    hold <= '0;
    else if (complete && !dly)  hold <= en_sr ? mem_rdata : '0;
  end

  sr_to_dr #(.W(DW)) u_s2d (
    .d (hold), .en (dly | (strobe & en_f)), .q_t (d_t), .q_f (d_f)
  );
endmodule
