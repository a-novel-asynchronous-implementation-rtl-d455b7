// tb_dr_gate: checks the dual-rail AND and OR gates. For every pair of input
// values the inputs are made valid one after the other: the output must stay
// null while only one input is valid, show the right value one gate delay
// after both are, hold while only one input has returned to null, and be
// null one delay after both have.
// The expected values are computed in the testbench itself, independently of
// the design; stimulus and checks are this testbench's own.
`timescale 1ns/1ps
module tb_dr_gate;
  logic clk = 0, rst = 1;
  logic a_t = 0, a_f = 0, b_t = 0, b_f = 0;
  logic and_t, and_f, or_t, or_f;
  int unsigned checks = 0, failures = 0;

  dr_gate #(.OP_OR(1'b0)) u_and (.clk, .rst, .a_t, .a_f, .b_t, .b_f, .y_t(and_t), .y_f(and_f));
  dr_gate #(.OP_OR(1'b1)) u_or  (.clk, .rst, .a_t, .a_f, .b_t, .b_f, .y_t(or_t),  .y_f(or_f));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [1:0] got, logic [1:0] exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %b exp %b", what, got, exp); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    for (int r = 0; r < 40; r++) begin
      bit a, b;
      a = 1'(r & 1); b = 1'((r >> 1) & 1);
      @(negedge clk); a_t = a; a_f = !a;
      repeat (3) @(posedge clk); #1;
      chk({and_t, and_f}, 2'b00, "and early"); chk({or_t, or_f}, 2'b00, "or early");
      @(negedge clk); b_t = b; b_f = !b;
      @(posedge clk); #1;
      chk({and_t, and_f}, {a & b, !(a & b)}, "and value");
      chk({or_t, or_f},   {a | b, !(a | b)}, "or value");
      @(negedge clk); a_t = 0; a_f = 0;
      repeat (3) @(posedge clk); #1;
      chk({and_t, and_f}, {a & b, !(a & b)}, "and hold");
      chk({or_t, or_f},   {a | b, !(a | b)}, "or hold");
      @(negedge clk); b_t = 0; b_f = 0;
      @(posedge clk); #1;
      chk({and_t, and_f}, 2'b00, "and null"); chk({or_t, or_f}, 2'b00, "or null");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
