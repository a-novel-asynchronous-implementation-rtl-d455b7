// mem_write_if: dual-rail write interface to a conventional memory.
//
// The request is a dual-rail codeword {we, addr, data}. Once it is complete
// and we is true the single-rail address and data are presented with a
// write enable; the completion strobe, delayed by a matched delay longer than
// the memory write time, becomes the acknowledge. A request with we = 0 is
// acknowledged one strobe delay after it is complete, without a write. The
// acknowledge falls after the request has returned to null.
// The write enable is gated by the combinational completeness of the
// codeword so that no write happens while the codeword is returning to null.
// Following the original design: the same converter and matched-delay scheme,
// applied to a write. Own choice: the write side itself, which the original
// design does not draw.
module mem_write_if #(
  parameter int unsigned AW    = 12,
  parameter int unsigned DW    = 8,
  parameter int unsigned DELAY = 4
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [AW-1:0] a_t,
  input  logic [AW-1:0] a_f,
  input  logic [DW-1:0] wd_t,
  input  logic [DW-1:0] wd_f,
  input  logic          we_t,
  input  logic          we_f,
  output logic [AW-1:0] mem_addr,
  output logic [DW-1:0] mem_wdata,
  output logic          mem_we,
  output logic          ack
);
  logic strobe, dly, complete, we_sr;

  dr_to_sr #(.W(AW + DW + 1)) u_d2s (
    .clk (clk), .rst (rst), .d_t ({we_t, a_t, wd_t}), .d_f ({we_f, a_f, wd_f}),
    .d ({we_sr, mem_addr, mem_wdata}), .strobe (strobe)
  );
  assign complete = (&(a_t | a_f)) & (&(wd_t | wd_f)) & (we_t | we_f);
  assign mem_we   = complete & we_sr;

  matched_delay #(.DELAY(DELAY)) u_dly (
    .clk (clk), .rst (rst), .in (strobe & we_t), .out (dly)
  );

  assign ack = dly | (strobe & we_f);
endmodule
