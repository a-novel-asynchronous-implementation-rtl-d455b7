// branch_control: Branch Control of the ID stage, built from dual-rail gates.
//
// Decides whether a PIC18 conditional branch (BZ, BNZ, BC, BNC, BOV, BNOV,
// BN, BNN) is taken. The condition code cc = instruction bits [10:8]:
// cc[2:1] selects the flag (0 = Z, 1 = C, 2 = OV, 3 = N) and cc[0] = 1 asks
// for the flag to be clear. Everything is made of the C-element based
// dual-rail AND/OR gates (dr_gate): a tree of three dual-rail 2:1
// multiplexers (dr_mux2) picks the flag and a dual-rail XOR applies the polarity. Inversion in
// dual-rail is a swap of the two rails and costs no gate.
// The output `taken` becomes valid only once STATUS and cc are valid and
// returns to null only after both have returned to null.
// Latency: six gate delays in each direction (AND then OR for each of the
// two multiplexer levels and for the XOR).
// Following the original design: Branch Control in ID reads STATUS and
// decides taken or not taken, built from dual-rail gates. Own choice: the
// gate arrangement (two levels of multiplexers and an XOR for the polarity).
module branch_control (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] status_t,
  input  logic [7:0] status_f,
  input  logic [2:0] cc_t,
  input  logic [2:0] cc_f,
  output logic       taken_t,
  output logic       taken_f
);
  // flag selection: a tree of dual-rail 2:1 multiplexers
  logic [2:0] m_t, m_f;
  dr_mux2 u_m0 (.clk, .rst, .s_t(cc_t[1]), .s_f(cc_f[1]), .a_t(status_t[0]), .a_f(status_f[0]),
                .b_t(status_t[2]), .b_f(status_f[2]), .y_t(m_t[0]), .y_f(m_f[0]));   // C : Z
  dr_mux2 u_m1 (.clk, .rst, .s_t(cc_t[1]), .s_f(cc_f[1]), .a_t(status_t[4]), .a_f(status_f[4]),
                .b_t(status_t[3]), .b_f(status_f[3]), .y_t(m_t[1]), .y_f(m_f[1]));   // N : OV
  dr_mux2 u_m2 (.clk, .rst, .s_t(cc_t[2]), .s_f(cc_f[2]), .a_t(m_t[1]), .a_f(m_f[1]),
                .b_t(m_t[0]), .b_f(m_f[0]), .y_t(m_t[2]), .y_f(m_f[2]));

  // polarity: taken = flag XOR cc[0] = (flag & ~cc0) | (~flag & cc0)
  logic x0_t, x0_f, x1_t, x1_f;
  dr_gate #(.OP_OR(1'b0)) u_x0 (.clk, .rst, .a_t(m_t[2]), .a_f(m_f[2]), .b_t(cc_f[0]), .b_f(cc_t[0]), .y_t(x0_t), .y_f(x0_f));
  dr_gate #(.OP_OR(1'b0)) u_x1 (.clk, .rst, .a_t(m_f[2]), .a_f(m_t[2]), .b_t(cc_t[0]), .b_f(cc_f[0]), .y_t(x1_t), .y_f(x1_f));
  dr_gate #(.OP_OR(1'b1)) u_x2 (.clk, .rst, .a_t(x0_t), .a_f(x0_f), .b_t(x1_t), .b_f(x1_f), .y_t(taken_t), .y_f(taken_f));
endmodule
