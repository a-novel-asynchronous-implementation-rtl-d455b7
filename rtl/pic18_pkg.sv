// pic18_pkg: types and constants shared by the asynchronous PIC18 pipeline.
//
// Defines the STATUS bit positions, the special-function-register addresses
// that the operand-fetch stage maps onto real registers, the ALU operation
// codes produced by the instruction decoder, and the packed bundles carried
// by the pipeline latches between ID and OF (id_of_t) and between OF and
// EX/WB (of_ex_t). Every bundle travels as a 4-phase dual-rail codeword: one
// "true" and one "false" wire per bit, all-zero meaning null (spacer).
// Own choices: the encodings of the operation, source and destination fields
// and of the stage-to-stage bundles; the STATUS bit positions and SFR
// addresses are those of the PIC18.
package pic18_pkg;

  localparam int unsigned PC_W    = 21;  // PIC18 program counter, byte address
  localparam int unsigned DADDR_W = 12;  // 16 banks x 256 bytes
  localparam int unsigned SP_W    = 6;   // stack pointer for a 32-level stack (0 = empty)

  // STATUS register bits (PIC18 layout)
  localparam int unsigned ST_C  = 0;
  localparam int unsigned ST_DC = 1;
  localparam int unsigned ST_Z  = 2;
  localparam int unsigned ST_OV = 3;
  localparam int unsigned ST_N  = 4;

  // Special function registers that are held in real registers
  localparam logic [DADDR_W-1:0] A_WREG   = 12'hFE8;
  localparam logic [DADDR_W-1:0] A_STATUS = 12'hFD8;
  localparam logic [DADDR_W-1:0] A_BSR    = 12'hFE0;
  localparam logic [DADDR_W-1:0] A_PRODL  = 12'hFF3;
  localparam logic [DADDR_W-1:0] A_PRODH  = 12'hFF4;

  typedef enum logic [4:0] {
    OP_NOP    = 5'd0,
    OP_ADD    = 5'd1,   // s1 + s2
    OP_ADDC   = 5'd2,   // s1 + s2 + C
    OP_AND    = 5'd3,
    OP_IOR    = 5'd4,
    OP_XOR    = 5'd5,
    OP_COM    = 5'd6,   // ~s1
    OP_DEC    = 5'd7,
    OP_INC    = 5'd8,
    OP_MOVF   = 5'd9,   // s1, flags Z N
    OP_PASS   = 5'd10,  // s1, no flags (MOVWF, MOVLW, MOVFF, MOVLB)
    OP_CLR    = 5'd11,
    OP_SET    = 5'd12,
    OP_NEG    = 5'd13,  // 0 - s1
    OP_RLC    = 5'd14,
    OP_RLNC   = 5'd15,
    OP_RRC    = 5'd16,
    OP_RRNC   = 5'd17,
    OP_SUBFWB = 5'd18,  // s2 - s1 - !C
    OP_SUBWF  = 5'd19,  // s1 - s2
    OP_SUBWFB = 5'd20,  // s1 - s2 - !C
    OP_SUBL   = 5'd21,  // k - W  (s1 = k)
    OP_MUL    = 5'd22,  // PROD = s1 * s2
    OP_BCF    = 5'd23,  // s1 & ~mask (s2 = mask)
    OP_BSF    = 5'd24,
    OP_BTG    = 5'd25,
    OP_PASSW  = 5'd26   // s2, no flags (MOVWF)
  } alu_op_e;

  // Where the EX/WB result goes
  typedef enum logic [2:0] {
    DST_NONE = 3'd0,
    DST_W    = 3'd1,
    DST_F    = 3'd2,   // file register (data memory or mapped register)
    DST_BSR  = 3'd3,
    DST_PROD = 3'd4
  } dst_e;

  // Where operand s1 comes from
  typedef enum logic [1:0] {
    SRC_NONE = 2'd0,
    SRC_FILE = 2'd1,   // file register, banked/access addressing
    SRC_ABS  = 2'd2,   // file register, absolute 12-bit address (MOVFF)
    SRC_LIT  = 2'd3    // literal k
  } src_e;

  // Mapped register identifiers (Register Address Mapping)
  typedef enum logic [2:0] {
    R_MEM    = 3'd0,
    R_WREG   = 3'd1,
    R_STATUS = 3'd2,
    R_BSR    = 3'd3,
    R_PRODL  = 3'd4,
    R_PRODH  = 3'd5
  } reg_id_e;

  // ID -> OF bundle
  typedef struct packed {
    alu_op_e              op;
    src_e                 src;
    logic                 s2_is_w;   // s2 = WREG (else bit mask / zero)
    logic                 access;    // the 'a' bit: 0 = access bank, 1 = BSR bank
    logic [DADDR_W-1:0]   faddr;     // f (8 bit) or fs (12 bit, MOVFF)
    logic [DADDR_W-1:0]   fdaddr;    // fd (12 bit, MOVFF), absolute
    logic                 fd_abs;    // destination address is fdaddr
    logic [7:0]           k;         // literal
    logic [2:0]           bit_n;     // bit number for bit operations
    dst_e                 dst;
  } id_of_t;

  // OF -> EX/WB bundle
  typedef struct packed {
    alu_op_e              op;
    logic [7:0]           s1;
    logic [7:0]           s2;
    logic [7:0]           status;    // current STATUS (carry in, unchanged flags)
    dst_e                 dst;
    reg_id_e              dreg;      // mapped register for DST_F
    logic [DADDR_W-1:0]   daddr;     // data memory address for DST_F
  } of_ex_t;

  localparam int unsigned ID_OF_W = $bits(id_of_t);
  localparam int unsigned OF_EX_W = $bits(of_ex_t);

  // Register Address Mapping: which real register, if any, backs an address
  function automatic reg_id_e map_reg(input logic [DADDR_W-1:0] a);
    case (a)
      A_WREG:   return R_WREG;
      A_STATUS: return R_STATUS;
      A_BSR:    return R_BSR;
      A_PRODL:  return R_PRODL;
      A_PRODH:  return R_PRODH;
      default:  return R_MEM;
    endcase
  endfunction

  // Bank Select Control: 8-bit f plus 'a' bit to a 12-bit data address
  function automatic logic [DADDR_W-1:0] bank_addr(input logic a, input logic [3:0] bsr,
                                                   input logic [7:0] f);
    if (a) return {bsr, f};
    else   return f[7] ? {4'hF, f} : {4'h0, f};
  endfunction

endpackage
