// id_stage: instruction decode stage of the asynchronous PIC18.
//
// Contains the four parts of the decode stage: Instruction Decode (turns
// the 16-bit PIC18 instruction into the control bundle id_of_t for the OF
// and EX/WB stages), Branch Control (evaluates the condition of a relative
// conditional branch from STATUS), Stall Control and NPC Control (computes
// the next PC and the return-stack operation).
// Stall control: a conditional branch needs STATUS, which an instruction
// still in EX/WB may not yet have written. On the first pass of such a
// branch the stage sets the Stall register, writes back the branch's own PC
// (so it is fetched again) and sends a NOP down the pipeline. Because that
// NOP can enter the ID/OF latch only after the instruction ahead of it has
// left EX/WB, the second pass, which finds Stall set, reads a settled STATUS,
// decides the branch and clears Stall.
// Handshake: when the IF/ID latch holds a complete codeword the stage raises
// its read strobe to STATUS, Stall and the return stack; once all reads are
// valid the dr_eval block computes everything at once. The writes to PC,
// Stall and the stack are sent as dual-rail codewords, and the control
// bundle is released to the ID/OF latch only after all three writes are
// acknowledged. Everything returns to null after the IF/ID latch does.
// Implemented instructions: those of the PIC18 subset listed in the README;
// all other opcodes decode as NOP.
// Branch Control is the branch_control module, built from dual-rail gates
// (dr_mux2/dr_gate); its taken/not-taken output joins the stage's inputs.
// From the document: the four parts, Branch Control reading STATUS, and
// reading a stalled branch again by holding NPC. This design's own choices:
// the control bundle encoding, the write-then-release ordering, PC+4 for
// two-word instructions, and stalling only the conditional branches.
module id_stage
  import pic18_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  // from IF/ID latch: {pc, word1, word0}
  input  logic [PC_W+31:0]     in_t,
  input  logic [PC_W+31:0]     in_f,
  // register reads
  output logic                 rd,
  input  logic [7:0]           status_t,
  input  logic [7:0]           status_f,
  input  logic                 stall_t,
  input  logic                 stall_f,
  input  logic [SP_W+PC_W-1:0] stk_t,      // {STKPTR, TOS}
  input  logic [SP_W+PC_W-1:0] stk_f,
  // register writes
  output logic [PC_W-1:0]      pcw_t,
  output logic [PC_W-1:0]      pcw_f,
  output logic                 pcw_we_t,
  output logic                 pcw_we_f,
  input  logic                 pcw_ack,
  output logic                 stallw_t,
  output logic                 stallw_f,
  output logic                 stallw_we_t,
  output logic                 stallw_we_f,
  input  logic                 stallw_ack,
  output logic [1:0]           stkop_t,
  output logic [1:0]           stkop_f,
  output logic [PC_W-1:0]      stkd_t,
  output logic [PC_W-1:0]      stkd_f,
  input  logic                 stkw_ack,
  // to ID/OF latch
  output logic [ID_OF_W-1:0]   out_t,
  output logic [ID_OF_W-1:0]   out_f
);
  localparam int unsigned EW = ID_OF_W + 1 + PC_W + 1 + 1 + 2 + PC_W;

  typedef struct packed {
    id_of_t            ctrl;
    logic              pc_we;
    logic [PC_W-1:0]   npc;
    logic              stall_we;
    logic              stall_next;
    logic [1:0]        stk_op;
    logic [PC_W-1:0]   stk_data;
  } id_res_t;

  logic [PC_W-1:0] pc;
  logic [15:0]     iw, w2;
  logic            stall;
  logic [PC_W-1:0] tos;
  logic            in_valid, in_null, l1_valid;
  id_res_t         res;
  logic [EW-1:0]   ev_t, ev_f;
  id_res_t         evt, evf;

  assign {pc, w2, iw} = in_t;
  assign stall        = stall_t;
  assign tos          = stk_t[PC_W-1:0];

  assign l1_valid = &(in_t | in_f);
  assign rd       = l1_valid;
  // Branch Control: condition of BZ/BNZ/BC/BNC/BOV/BNOV/BN/BNN, in dual-rail gates
  logic taken_t, taken_f;
  branch_control u_bc (
    .clk (clk), .rst (rst), .status_t (status_t), .status_f (status_f),
    .cc_t (in_t[10:8]), .cc_f (in_f[10:8]), .taken_t (taken_t), .taken_f (taken_f)
  );

  assign in_valid = l1_valid & (&(status_t | status_f)) & (stall_t | stall_f)
                  & (&(stk_t | stk_f)) & (taken_t | taken_f);
  assign in_null  = ~|{in_t, in_f, status_t, status_f, stall_t, stall_f, stk_t, stk_f,
                       taken_t, taken_f};

  // Instruction Decode, Stall Control and NPC Control
  always_comb begin
    logic [PC_W-1:0] pc2, pc4;
    logic [PC_W-1:0] off8, off11;
    id_of_t c;
    pc2   = pc + PC_W'(2);
    pc4   = pc + PC_W'(4);
    off8  = PC_W'(signed'({{(PC_W-9){iw[7]}},  iw[7:0],  1'b0}));
    off11 = PC_W'(signed'({{(PC_W-12){iw[10]}}, iw[10:0], 1'b0}));

    c         = '0;
    c.op      = OP_NOP;
    c.src     = SRC_NONE;
    c.dst     = DST_NONE;
    c.access  = iw[8];
    c.faddr   = {4'h0, iw[7:0]};
    c.k       = iw[7:0];
    c.bit_n   = iw[11:9];

    res            = '0;
    res.pc_we      = 1'b1;
    res.stall_we   = 1'b1;
    res.npc        = pc2;
    res.stall_next = 1'b0;
    res.stk_op     = 2'd0;

    // byte-oriented: 'd' bit selects the destination
    casez (iw)
      16'b0000_0000_0000_0101: begin res.stk_op = 2'd1; res.stk_data = pc2; end // PUSH
      16'b0000_0000_0000_0110: res.stk_op = 2'd2;                                 // POP
      16'b0000_0000_0001_001?: begin res.npc = tos; res.stk_op = 2'd2; end        // RETURN
      16'b0000_0001_0000_????: begin c.op = OP_PASS; c.src = SRC_LIT;             // MOVLB
                                     c.k = {4'h0, iw[3:0]}; c.dst = DST_BSR; end
      16'b0000_001?_????_????: begin c.op = OP_MUL;  c.src = SRC_FILE; c.s2_is_w = 1'b1; c.dst = DST_PROD; end
      16'b0000_01??_????_????: begin c.op = OP_DEC;  c.src = SRC_FILE; end
      16'b0000_1000_????_????: begin c.op = OP_SUBL; c.src = SRC_LIT; c.s2_is_w = 1'b1; c.dst = DST_W; end
      16'b0000_1001_????_????: begin c.op = OP_IOR;  c.src = SRC_LIT; c.s2_is_w = 1'b1; c.dst = DST_W; end
      16'b0000_1010_????_????: begin c.op = OP_XOR;  c.src = SRC_LIT; c.s2_is_w = 1'b1; c.dst = DST_W; end
      16'b0000_1011_????_????: begin c.op = OP_AND;  c.src = SRC_LIT; c.s2_is_w = 1'b1; c.dst = DST_W; end
      16'b0000_1101_????_????: begin c.op = OP_MUL;  c.src = SRC_LIT; c.s2_is_w = 1'b1; c.dst = DST_PROD; end
      16'b0000_1110_????_????: begin c.op = OP_PASS; c.src = SRC_LIT; c.dst = DST_W; end
      16'b0000_1111_????_????: begin c.op = OP_ADD;  c.src = SRC_LIT; c.s2_is_w = 1'b1; c.dst = DST_W; end
      16'b0001_00??_????_????: begin c.op = OP_IOR;  c.src = SRC_FILE; c.s2_is_w = 1'b1; end
      16'b0001_01??_????_????: begin c.op = OP_AND;  c.src = SRC_FILE; c.s2_is_w = 1'b1; end
      16'b0001_10??_????_????: begin c.op = OP_XOR;  c.src = SRC_FILE; c.s2_is_w = 1'b1; end
      16'b0001_11??_????_????: begin c.op = OP_COM;  c.src = SRC_FILE; end
      16'b0010_00??_????_????: begin c.op = OP_ADDC; c.src = SRC_FILE; c.s2_is_w = 1'b1; end
      16'b0010_01??_????_????: begin c.op = OP_ADD;  c.src = SRC_FILE; c.s2_is_w = 1'b1; end
      16'b0010_10??_????_????: begin c.op = OP_INC;  c.src = SRC_FILE; end
      16'b0011_00??_????_????: begin c.op = OP_RRC;  c.src = SRC_FILE; end
      16'b0011_01??_????_????: begin c.op = OP_RLC;  c.src = SRC_FILE; end
      16'b0100_00??_????_????: begin c.op = OP_RRNC; c.src = SRC_FILE; end
      16'b0100_01??_????_????: begin c.op = OP_RLNC; c.src = SRC_FILE; end
      16'b0101_00??_????_????: begin c.op = OP_MOVF; c.src = SRC_FILE; end
      16'b0101_01??_????_????: begin c.op = OP_SUBFWB; c.src = SRC_FILE; c.s2_is_w = 1'b1; end
      16'b0101_10??_????_????: begin c.op = OP_SUBWFB; c.src = SRC_FILE; c.s2_is_w = 1'b1; end
      16'b0101_11??_????_????: begin c.op = OP_SUBWF;  c.src = SRC_FILE; c.s2_is_w = 1'b1; end
      16'b0110_100?_????_????: begin c.op = OP_SET;  c.src = SRC_FILE; c.dst = DST_F; end
      16'b0110_101?_????_????: begin c.op = OP_CLR;  c.src = SRC_FILE; c.dst = DST_F; end
      16'b0110_110?_????_????: begin c.op = OP_NEG;  c.src = SRC_FILE; c.dst = DST_F; end
      16'b0110_111?_????_????: begin c.op = OP_PASSW; c.src = SRC_FILE; c.s2_is_w = 1'b1; c.dst = DST_F; end
      16'b0111_????_????_????: begin c.op = OP_BTG;  c.src = SRC_FILE; c.dst = DST_F; end
      16'b1000_????_????_????: begin c.op = OP_BSF;  c.src = SRC_FILE; c.dst = DST_F; end
      16'b1001_????_????_????: begin c.op = OP_BCF;  c.src = SRC_FILE; c.dst = DST_F; end
      16'b1100_????_????_????: begin                                                   // MOVFF
        c.op = OP_PASS; c.src = SRC_ABS; c.faddr = iw[11:0];
        c.fdaddr = w2[11:0]; c.fd_abs = 1'b1; c.dst = DST_F;
        res.npc = pc4;
      end
      16'b1101_0???_????_????: res.npc = pc2 + off11;                                // BRA
      16'b1101_1???_????_????: begin res.npc = pc2 + off11;                         // RCALL
                                     res.stk_op = 2'd1; res.stk_data = pc2; end
      16'b1110_0???_????_????: begin                                                 // Bcc
        if (!stall) begin
          res.npc        = pc;          // fetch the branch again
          res.stall_next = 1'b1;
        end else begin
          res.npc = taken_t ? pc2 + off8 : pc2;
        end
      end
      16'b1110_110?_????_????: begin                                                 // CALL
        res.npc = {w2[11:0], iw[7:0], 1'b0};
        res.stk_op = 2'd1; res.stk_data = pc4;
      end
      16'b1110_1111_????_????: res.npc = {w2[11:0], iw[7:0], 1'b0};                 // GOTO
      16'b1110_1110_????_????: res.npc = pc4;                                        // LFSR: not implemented, skipped
      default: ;                                                                     // NOP and unimplemented
    endcase

    // byte-oriented ops with a 'd' bit
    if (c.src == SRC_FILE && c.dst == DST_NONE && c.op != OP_MUL)
      c.dst = iw[9] ? DST_F : DST_W;
    res.ctrl = c;
  end

  dr_eval #(.W(EW)) u_eval (
    .clk (clk), .rst (rst), .in_valid (in_valid), .in_null (in_null),
    .val (res), .out_t (ev_t), .out_f (ev_f)
  );
  assign evt = ev_t;
  assign evf = ev_f;

  assign pcw_t       = evt.npc;
  assign pcw_f       = evf.npc;
  assign pcw_we_t    = evt.pc_we;
  assign pcw_we_f    = evf.pc_we;
  assign stallw_t    = evt.stall_next;
  assign stallw_f    = evf.stall_next;
  assign stallw_we_t = evt.stall_we;
  assign stallw_we_f = evf.stall_we;
  assign stkop_t     = evt.stk_op;
  assign stkop_f     = evf.stk_op;
  assign stkd_t      = evt.stk_data;
  assign stkd_f      = evf.stk_data;

  logic wr_done;
  assign wr_done = pcw_ack & stallw_ack & stkw_ack;
  assign out_t   = evt.ctrl & {ID_OF_W{wr_done}};
  assign out_f   = evf.ctrl & {ID_OF_W{wr_done}};
endmodule
