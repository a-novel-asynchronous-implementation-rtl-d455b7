// pic18_alu: combinational ALU and 8x8 multiplier of the EX/WB stage.
//
// Computes the 8-bit result, the 16-bit product and the new STATUS for one
// PIC18 operation. Additions and subtractions share one 8-bit adder:
// a - b is formed as a + ~b + carry_in, so C and DC mean "no borrow" as on
// the PIC18. Flag updates follow the PIC18 data sheet: arithmetic ops set
// C, DC, Z, OV, N; logic, MOVF and COMF set Z, N; rotates through carry set
// C, Z, N; rotates without carry set Z, N; CLRF sets Z; moves, SETF, bit ops
// and multiplies leave STATUS alone. status_out merges the new flags into
// status_in; flags_we tells whether any flag bit is affected.
// Following the PIC18 instruction set: results and flags. Own choice
// (helper): one adder for all arithmetic.
module pic18_alu
  import pic18_pkg::*;
(
  input  alu_op_e     op,
  input  logic [7:0]  s1,
  input  logic [7:0]  s2,
  input  logic [7:0]  status_in,
  output logic [7:0]  result,
  output logic [15:0] prod,
  output logic [7:0]  status_out,
  output logic        flags_we
);
  localparam logic [7:0] M_ALL = 8'b0001_1111;
  localparam logic [7:0] M_ZN  = 8'b0001_0100;
  localparam logic [7:0] M_CZN = 8'b0001_0101;
  localparam logic [7:0] M_Z   = 8'b0000_0100;

  always_comb begin
    logic [7:0] a, b, mask, fl;
    logic       cin, arith, cout, dc, ov;
    logic [8:0] sum;
    logic [4:0] nib;
    logic       cy;

    cy     = status_in[ST_C];
    a      = s1;
    b      = 8'h00;
    cin    = 1'b0;
    arith  = 1'b0;
    result = s1;
    mask   = 8'h00;
    fl     = 8'h00;
    prod   = 16'(s1) * 16'(s2);

    case (op)
      OP_ADD:    begin b = s2;     cin = 1'b0;  arith = 1'b1; end
      OP_ADDC:   begin b = s2;     cin = cy;    arith = 1'b1; end
      OP_INC:    begin b = 8'h01;  cin = 1'b0;  arith = 1'b1; end
      OP_DEC:    begin b = 8'hFF;  cin = 1'b0;  arith = 1'b1; end
      OP_SUBWF,
      OP_SUBL:   begin b = ~s2;    cin = 1'b1;  arith = 1'b1; end
      OP_SUBWFB: begin b = ~s2;    cin = cy;    arith = 1'b1; end
      OP_SUBFWB: begin a = s2; b = ~s1; cin = cy; arith = 1'b1; end
      OP_NEG:    begin a = 8'h00; b = ~s1; cin = 1'b1; arith = 1'b1; end
      default: ;
    endcase

    sum  = 9'(a) + 9'(b) + 9'(cin);
    nib  = 5'(a[3:0]) + 5'(b[3:0]) + 5'(cin);
    cout = sum[8];
    dc   = nib[4];
    ov   = (a[7] == b[7]) && (sum[7] != a[7]);

    if (arith) begin
      result = sum[7:0];
      mask   = M_ALL;
      fl[ST_C] = cout; fl[ST_DC] = dc; fl[ST_OV] = ov;
    end else begin
      case (op)
        OP_AND:   begin result = s1 & s2;  mask = M_ZN; end
        OP_IOR:   begin result = s1 | s2;  mask = M_ZN; end
        OP_XOR:   begin result = s1 ^ s2;  mask = M_ZN; end
        OP_COM:   begin result = ~s1;      mask = M_ZN; end
        OP_MOVF:  begin result = s1;       mask = M_ZN; end
        OP_PASS:  result = s1;
        OP_PASSW: result = s2;
        OP_CLR:   begin result = 8'h00;    mask = M_Z;  end
        OP_SET:   result = 8'hFF;
        OP_RLC:   begin result = {s1[6:0], cy}; fl[ST_C] = s1[7]; mask = M_CZN; end
        OP_RRC:   begin result = {cy, s1[7:1]}; fl[ST_C] = s1[0]; mask = M_CZN; end
        OP_RLNC:  begin result = {s1[6:0], s1[7]}; mask = M_ZN; end
        OP_RRNC:  begin result = {s1[0], s1[7:1]}; mask = M_ZN; end
        OP_BCF:   result = s1 & ~s2;
        OP_BSF:   result = s1 | s2;
        OP_BTG:   result = s1 ^ s2;
        default:  result = s1;   // OP_NOP, OP_MUL
      endcase
    end
    fl[ST_Z] = (result == 8'h00);
    fl[ST_N] = result[7];

    status_out = (status_in & ~mask) | (fl & mask);
    flags_we   = |mask;
  end
endmodule
