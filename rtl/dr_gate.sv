// dr_gate: two-input dual-rail AND or OR gate for the 4-phase RTZ protocol.
//
// Four C-elements, one per minterm of the two input bits ({a.t,b.t},
// {a.t,b.f}, {a.f,b.t}, {a.f,b.f}), fire only when both inputs carry data and
// release only when both have returned to null. OR-ing the minterm outputs
// onto the true or false rail gives the function: for OR the true rail
// collects the three minterms with a one, for AND only {a.t,b.t}. The output
// therefore never becomes valid before all inputs are valid and never
// returns to null before all inputs are null.
// Parameter OP_OR = 1 builds OR, 0 builds AND. Latency: one C-element delay.
// Following the original design: a row of C-elements, one per input minterm,
// feeding OR gates onto the output rails. Own choice: one module for AND and
// OR, selected by OP_OR.
module dr_gate #(
  parameter bit OP_OR = 1'b1
) (
  input  logic clk,
  input  logic rst,
  input  logic a_t,
  input  logic a_f,
  input  logic b_t,
  input  logic b_f,
  output logic y_t,
  output logic y_f
);
  logic m_tt, m_tf, m_ft, m_ff;

  c_element #(.N(2)) u_tt (.clk(clk), .rst(rst), .in({a_t, b_t}), .out(m_tt));
  c_element #(.N(2)) u_tf (.clk(clk), .rst(rst), .in({a_t, b_f}), .out(m_tf));
  c_element #(.N(2)) u_ft (.clk(clk), .rst(rst), .in({a_f, b_t}), .out(m_ft));
  c_element #(.N(2)) u_ff (.clk(clk), .rst(rst), .in({a_f, b_f}), .out(m_ff));

  if (OP_OR) begin : g_or
    assign y_t = m_tt | m_tf | m_ft;
    assign y_f = m_ff;
  end else begin : g_and
    assign y_t = m_tt;
    assign y_f = m_tf | m_ft | m_ff;
  end
endmodule
