// of_stage: operand fetch stage of the asynchronous PIC18.
//
// Prepares the operands for EX/WB from the ID/OF control bundle:
//  * Bank Select Control forms the 12-bit data address: with a = 1 the
//    4-bit BSR is placed in front of the 8-bit f; with a = 0 the access bank
//    is used (f < 0x80 in bank 0, f >= 0x80 in bank 15, the SFR area).
//    MOVFF carries its own 12-bit addresses.
//  * Register Address Mapping recognises the SFR addresses held in real
//    registers (WREG, STATUS, BSR, PRODL, PRODH) and takes the operand from
//    the register instead of the data memory.
//  * Bit-Op Control turns the bit number of BCF/BSF/BTG into a one-hot mask,
//    carried as source 2.
//  * RAM Control reads the data memory through the dual-rail memory
//    interface, and skips the memory when the operand is a literal, a mapped
//    register or not needed.
// Output (of_ex_t): source 1, source 2 (WREG or bit mask), the current
// STATUS (carry in), and the resolved destination.
// Handshake: a complete ID/OF codeword raises the read strobe of the
// registers; a first dr_eval block emits the memory request once BSR is
// valid, a second one emits the result once the memory answer is valid.
// Both return to null after the ID/OF latch and the reads have.
// Following the original design: Bank Select Control, Register Address
// Mapping, Bit-Op Control and RAM Control producing source 1, source 2, carry
// and destination. Own choices: the PIC18 meaning of the a bit, the mapped
// addresses, passing the whole STATUS as the carry signal.
module of_stage
  import pic18_pkg::*;
#(
  parameter int unsigned MEM_DELAY = 4
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [ID_OF_W-1:0]  in_t,
  input  logic [ID_OF_W-1:0]  in_f,
  // register reads: {PRODH, PRODL, BSR(8, upper 4 zero), STATUS, WREG}
  output logic                rd,
  input  logic [39:0]         regs_t,
  input  logic [39:0]         regs_f,
  // data memory (single rail, behind the dual-rail read interface)
  output logic [DADDR_W-1:0]  mem_addr,
  input  logic [7:0]          mem_rdata,
  // to OF/EX latch
  output logic [OF_EX_W-1:0]  out_t,
  output logic [OF_EX_W-1:0]  out_f
);
  id_of_t          c;
  logic [7:0]      wreg, status, bsr, prodl, prodh;
  logic            l2_valid, regs_valid, regs_null, l2_null;
  logic [DADDR_W-1:0] saddr, daddr;
  reg_id_e         sreg, dreg;
  logic            mem_en;
  logic [DADDR_W:0]   req_t, req_f;
  logic [7:0]      md_t, md_f;
  of_ex_t          res;

  assign c = id_of_t'(in_t);
  assign {prodh, prodl, bsr, status, wreg} = regs_t;

  assign l2_valid   = &(in_t | in_f);
  assign l2_null    = ~|(in_t | in_f);
  assign regs_valid = &(regs_t | regs_f);
  assign regs_null  = ~|(regs_t | regs_f);
  assign rd         = l2_valid;

  // Bank Select Control and Register Address Mapping
  always_comb begin
    saddr  = (c.src == SRC_ABS) ? c.faddr : bank_addr(c.access, bsr[3:0], c.faddr[7:0]);
    daddr  = c.fd_abs ? c.fdaddr : saddr;
    sreg   = map_reg(saddr);
    dreg   = map_reg(daddr);
    mem_en = (c.src == SRC_FILE || c.src == SRC_ABS) && sreg == R_MEM;
  end

  // RAM Control: memory request {en, addr}
  dr_eval #(.W(DADDR_W + 1)) u_req (
    .clk (clk), .rst (rst),
    .in_valid (l2_valid & regs_valid), .in_null (l2_null & regs_null),
    .val ({mem_en, saddr}), .out_t (req_t), .out_f (req_f)
  );

  mem_read_if #(.AW(DADDR_W), .DW(8), .DELAY(MEM_DELAY)) u_ram_if (
    .clk (clk), .rst (rst),
    .a_t (req_t[DADDR_W-1:0]), .a_f (req_f[DADDR_W-1:0]),
    .en_t (req_t[DADDR_W]), .en_f (req_f[DADDR_W]),
    .mem_addr (mem_addr), .mem_rdata (mem_rdata),
    .d_t (md_t), .d_f (md_f)
  );

  // Source 1 / Source 2 selection and Bit-Op Control
  always_comb begin
    logic [7:0] s1;
    case (c.src)
      SRC_LIT:  s1 = c.k;
      SRC_NONE: s1 = 8'h00;
      default: begin
        case (sreg)
          R_WREG:   s1 = wreg;
          R_STATUS: s1 = status;
          R_BSR:    s1 = bsr;
          R_PRODL:  s1 = prodl;
          R_PRODH:  s1 = prodh;
          default:  s1 = md_t;
        endcase
      end
    endcase
    res        = '0;
    res.op     = c.op;
    res.s1     = s1;
    res.s2     = c.s2_is_w ? wreg : (8'h01 << c.bit_n);
    res.status = status;
    res.dst    = c.dst;
    res.dreg   = dreg;
    res.daddr  = daddr;
  end

  dr_eval #(.W(OF_EX_W)) u_out (
    .clk (clk), .rst (rst),
    .in_valid (l2_valid & regs_valid & (&(md_t | md_f))),
    .in_null  (l2_null & regs_null & ~|(md_t | md_f)),
    .val (res), .out_t (out_t), .out_f (out_f)
  );
endmodule
