// return_stack: the PIC18 hardware return-address stack with its STKPTR.
//
// Holds DEPTH return addresses of PC_W bits and the stack pointer STKPTR,
// both as dual-rail registers. STKPTR points at the top of stack (TOS);
// 0 means empty, entries 1..DEPTH are used. DEPTH must be below 2**SP_W.
// Write channel: a dual-rail codeword {op, data}; op = 1 pushes data
// (STKPTR+1, then TOS = data), op = 2 pops (STKPTR-1), op = 0 changes
// nothing. The codeword is acknowledged on w_ack once applied and w_ack
// falls after it returned to null. A push on a full stack or a pop on an
// empty one is ignored (no overflow/underflow flags, no reset on overflow).
// Read port: while rd is high, {STKPTR, TOS} is shown as a dual-rail
// codeword, otherwise null.
// Following the original design: a 32-level stack with STKPTR as registers.
// Own choices: STKPTR 0 means empty, overflow and underflow are ignored.
module return_stack
  import pic18_pkg::*;
#(
  parameter int unsigned DEPTH = 32
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [1:0]           op_t,
  input  logic [1:0]           op_f,
  input  logic [PC_W-1:0]      d_t,
  input  logic [PC_W-1:0]      d_f,
  output logic                 w_ack,
  input  logic                 rd,
  output logic [SP_W+PC_W-1:0] r_t,
  output logic [SP_W+PC_W-1:0] r_f,
  output logic [SP_W-1:0]      stkptr
);
  logic [PC_W-1:0] stack [1:DEPTH];
  logic [PC_W-1:0] tos;
  logic            complete;

  assign complete = (&(op_t | op_f)) & (&(d_t | d_f));

  always_ff @(posedge clk) begin
    if (rst) begin
      stkptr <= '0;
    end else if (complete && !w_ack) begin
      if (op_t == 2'd1 && stkptr < SP_W'(DEPTH)) begin
        stkptr            <= stkptr + 1'b1;
        stack[stkptr + 1'b1] <= d_t;
      end else if (op_t == 2'd2 && stkptr != '0) begin
        stkptr <= stkptr - 1'b1;
      end
    end
  end

  completion_detector #(.W(2 + PC_W)) u_cd (
    .clk (clk), .rst (rst), .d_t ({op_t, d_t}), .d_f ({op_f, d_f}), .done (w_ack)
  );

  assign tos = (stkptr == '0) ? '0 : stack[stkptr];
  assign r_t =  {stkptr, tos} & {(SP_W+PC_W){rd}};
  assign r_f = ~{stkptr, tos} & {(SP_W+PC_W){rd}};
endmodule
