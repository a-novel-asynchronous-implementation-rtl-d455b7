// dr_mux2: dual-rail 2-to-1 multiplexer built from dual-rail gates.
//
// y = s ? a : b, formed as (s AND a) OR (NOT s AND b) with three dr_gate
// instances; NOT s is the select with its rails swapped. Like every gate of
// the 4-phase RTZ style, the output becomes valid only after s, a and b
// are all valid and returns to null only after all three are null (the
// unselected input must be valid too). Latency: two gate delays.
// Following the original design: a multiplexer built from the basic dual-rail
// gates. Own choice: the AND-OR structure with three gates.
module dr_mux2 (
  input  logic clk,
  input  logic rst,
  input  logic s_t,
  input  logic s_f,
  input  logic a_t,
  input  logic a_f,
  input  logic b_t,
  input  logic b_f,
  output logic y_t,
  output logic y_f
);
  logic pa_t, pa_f, pb_t, pb_f;

  dr_gate #(.OP_OR(1'b0)) u_and_a (.clk, .rst, .a_t(s_t), .a_f(s_f), .b_t(a_t), .b_f(a_f), .y_t(pa_t), .y_f(pa_f));
  dr_gate #(.OP_OR(1'b0)) u_and_b (.clk, .rst, .a_t(s_f), .a_f(s_t), .b_t(b_t), .b_f(b_f), .y_t(pb_t), .y_f(pb_f));
  dr_gate #(.OP_OR(1'b1)) u_or    (.clk, .rst, .a_t(pa_t), .a_f(pa_f), .b_t(pb_t), .b_f(pb_f), .y_t(y_t), .y_f(y_f));
endmodule
