// tb_return_stack: random push, pop and no-op codewords (4-phase) against a
// queue model of the 32-level stack. After each operation the read port
// must show {STKPTR, TOS} of the model; pushes on a full stack and pops on
// an empty one must be ignored. The acknowledge must rise one delay after a
// complete codeword and fall after it is null.
// The expected values are computed in the testbench itself, independently of
// the design; stimulus and checks are this testbench's own.
`timescale 1ns/1ps
module tb_return_stack;
  import pic18_pkg::*;
  logic clk = 0, rst = 1;
  logic [1:0] op_t = '0, op_f = '0;
  logic [PC_W-1:0] d_t = '0, d_f = '0;
  logic w_ack, rd = 0;
  logic [SP_W+PC_W-1:0] r_t, r_f;
  logic [SP_W-1:0] stkptr;
  int unsigned checks = 0, failures = 0;
  int unsigned model [$];
  int unsigned n_full = 0, n_empty = 0;

  return_stack dut (.clk, .rst, .op_t, .op_f, .d_t, .d_f, .w_ack, .rd, .r_t, .r_f, .stkptr);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 600; i++) begin
      logic [1:0] op;
      logic [PC_W-1:0] v;
      int unsigned tos;
      // phases: fill past full, then drain past empty, then random
      if (i < 40) op = 2'd1; else if (i < 80) op = 2'd2; else op = 2'($urandom_range(0, 2));
      v = PC_W'($urandom);
      if (op == 1) begin if (model.size() < 32) model.push_back(v); else n_full++; end
      if (op == 2) begin if (model.size() > 0) void'(model.pop_back()); else n_empty++; end
      @(negedge clk); op_t = op; op_f = ~op; d_t = v; d_f = ~v;
      @(posedge clk); #1 chk(w_ack == 1, "ack");
      @(negedge clk); op_t = '0; op_f = '0; d_t = '0; d_f = '0;
      @(posedge clk); #1 chk(w_ack == 0, "ack falls");
      rd = 1; #1;
      tos = model.size() ? model[$] : 0;
      chk(r_t == {SP_W'(model.size()), PC_W'(tos)} && r_f == ~r_t,
          $sformatf("step %0d: sp %0d tos %h, model %0d %h", i, r_t[SP_W+PC_W-1:PC_W], r_t[PC_W-1:0], model.size(), tos));
      rd = 0; #1;
      chk(r_t == 0 && r_f == 0, "read null");
    end
    chk(n_full > 0 && n_empty > 0, "full and empty cases");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
