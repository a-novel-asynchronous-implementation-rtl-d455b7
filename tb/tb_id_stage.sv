// tb_id_stage: the decode stage with real PC, Stall and return-stack
// registers and a behavioural STATUS read port. Each case presents an
// IF/ID codeword {pc, word1, word0}, waits for the ID/OF codeword, returns
// the input to null and waits for the output to go null. It checks the next
// PC written to the PC register, the Stall register, the stack pointer and
// the control bundle, for: byte, literal and bit instructions (operation,
// source, destination), MOVFF, BRA, GOTO, CALL, RCALL, RETURN, PUSH, POP,
// and conditional branches on both passes (first pass: refetch and Stall
// set; second pass: taken or not taken from STATUS, Stall cleared).
// The expected values are computed in the testbench itself, independently of
// the design; stimulus and checks are this testbench's own.
`timescale 1ns/1ps
module tb_id_stage;
  import pic18_pkg::*;
  logic clk = 0, rst = 1;
  logic [PC_W+31:0] in_t = '0, in_f = '0;
  logic rd;
  logic [7:0] status = '0, status_t, status_f;
  logic stall_t, stall_f;
  logic [SP_W+PC_W-1:0] stk_t, stk_f;
  logic [PC_W-1:0] pcw_t, pcw_f, stkd_t, stkd_f, pc_q;
  logic pcw_we_t, pcw_we_f, pcw_ack, stw_t, stw_f, stw_we_t, stw_we_f, stw_ack, stk_ack, stall_q;
  logic [1:0] stkop_t, stkop_f;
  logic [SP_W-1:0] sp;
  logic [ID_OF_W-1:0] out_t, out_f;
  int unsigned checks = 0, failures = 0;

  id_stage dut (.clk, .rst, .in_t, .in_f, .rd, .status_t, .status_f, .stall_t, .stall_f,
    .stk_t, .stk_f, .pcw_t, .pcw_f, .pcw_we_t, .pcw_we_f, .pcw_ack,
    .stallw_t(stw_t), .stallw_f(stw_f), .stallw_we_t(stw_we_t), .stallw_we_f(stw_we_f),
    .stallw_ack(stw_ack), .stkop_t, .stkop_f, .stkd_t, .stkd_f, .stkw_ack(stk_ack), .out_t, .out_f);
  dr_register #(.W(PC_W)) u_pc (.clk, .rst, .w_t(pcw_t), .w_f(pcw_f), .we_t(pcw_we_t), .we_f(pcw_we_f),
    .w_ack(pcw_ack), .rd(1'b0), .r_t(), .r_f(), .q(pc_q));
  dr_register #(.W(1)) u_stall (.clk, .rst, .w_t(stw_t), .w_f(stw_f), .we_t(stw_we_t), .we_f(stw_we_f),
    .w_ack(stw_ack), .rd(rd), .r_t(stall_t), .r_f(stall_f), .q(stall_q));
  return_stack u_stk (.clk, .rst, .op_t(stkop_t), .op_f(stkop_f), .d_t(stkd_t), .d_f(stkd_f),
    .w_ack(stk_ack), .rd(rd), .r_t(stk_t), .r_f(stk_f), .stkptr(sp));
  assign status_t = status & {8{rd}};
  assign status_f = ~status & {8{rd}};
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

  id_of_t ctrl;
  task automatic issue(logic [PC_W-1:0] pc, logic [15:0] w0, logic [15:0] w1);
    int n;
    @(negedge clk);
    in_t = {pc, w1, w0}; in_f = ~in_t;
    n = 0;
    do begin @(posedge clk); #1; n++; end while (!(&(out_t | out_f)) && n < 50);
    chk(n < 50, "output valid");
    ctrl = id_of_t'(out_t);
    @(negedge clk); in_t = '0; in_f = '0;
    n = 0;
    do begin @(posedge clk); #1; n++; end while ((|(out_t | out_f) || pcw_ack) && n < 50);
    chk(n < 50, "output null");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    // ADDWF 0x12, F, a=1
    issue(21'h100, 16'h2712, 16'h0);
    chk(ctrl.op == OP_ADD && ctrl.src == SRC_FILE && ctrl.dst == DST_F && ctrl.access && ctrl.faddr == 12'h012 && ctrl.s2_is_w, "ADDWF");
    chk(pc_q == 21'h102, "ADDWF next pc");
    // DECF 0x05, W
    issue(21'h102, 16'h0405, 16'h0);
    chk(ctrl.op == OP_DEC && ctrl.dst == DST_W && !ctrl.access, "DECF W");
    // MOVLW 0x3C
    issue(21'h104, 16'h0E3C, 16'h0);
    chk(ctrl.op == OP_PASS && ctrl.src == SRC_LIT && ctrl.dst == DST_W && ctrl.k == 8'h3C, "MOVLW");
    // MOVLB 7
    issue(21'h106, 16'h0107, 16'h0);
    chk(ctrl.dst == DST_BSR && ctrl.k == 8'h07, "MOVLB");
    // BSF 0x20, 5
    issue(21'h108, 16'h8A20, 16'h0);
    chk(ctrl.op == OP_BSF && ctrl.bit_n == 3'd5 && ctrl.dst == DST_F, "BSF");
    // MULLW 9
    issue(21'h10A, 16'h0D09, 16'h0);
    chk(ctrl.op == OP_MUL && ctrl.dst == DST_PROD && ctrl.src == SRC_LIT, "MULLW");
    // MOVFF 0x123 -> 0x456
    issue(21'h10C, 16'hC123, 16'hF456);
    chk(ctrl.src == SRC_ABS && ctrl.faddr == 12'h123 && ctrl.fd_abs && ctrl.fdaddr == 12'h456, "MOVFF");
    chk(pc_q == 21'h110, "MOVFF next pc is pc+4");
    // BRA -4 words
    issue(21'h110, 16'hD7FC, 16'h0);
    chk(pc_q == 21'h10A && ctrl.op == OP_NOP, "BRA backwards");
    // GOTO 0x1234
    issue(21'h10A, 16'hEF1A, 16'hF009);
    chk(pc_q == 21'h1234, $sformatf("GOTO %h", pc_q));
    // CALL 0x2000 from 0x1234 (return to 0x1238)
    issue(21'h1234, 16'hEC00, 16'hF010);
    chk(pc_q == 21'h2000 && sp == 1, "CALL");
    // RCALL +0x10 words from 0x2000 (return to 0x2002)
    issue(21'h2000, 16'hD810, 16'h0);
    chk(pc_q == 21'h2022 && sp == 2, "RCALL");
    // PUSH / POP
    issue(21'h2022, 16'h0005, 16'h0);
    chk(sp == 3 && pc_q == 21'h2024, "PUSH");
    issue(21'h2024, 16'h0006, 16'h0);
    chk(sp == 2, "POP");
    // RETURN twice
    issue(21'h2026, 16'h0012, 16'h0);
    chk(pc_q == 21'h2002 && sp == 1, $sformatf("RETURN 1: %h", pc_q));
    issue(21'h2002, 16'h0012, 16'h0);
    chk(pc_q == 21'h1238 && sp == 0, $sformatf("RETURN 2: %h", pc_q));
    // conditional branches, both passes, every condition, both outcomes
    for (int cc = 0; cc < 8; cc++) begin
      for (int v = 0; v < 2; v++) begin
        logic [15:0] w;
        bit flag, taken;
        int fb;
        fb = (cc / 2 == 0) ? ST_Z : (cc / 2 == 1) ? ST_C : (cc / 2 == 2) ? ST_OV : ST_N;
        status = 8'($urandom) & ~(8'h1 << fb) | (8'(v) << fb);
        flag = 1'(v);
        taken = (cc % 2 == 0) ? flag : !flag;
        w = 16'hE000 | 16'(cc << 8) | 16'h0005;   // +5 words
        issue(21'h300, w, 16'h0);
        chk(pc_q == 21'h300 && stall_q == 1 && ctrl.op == OP_NOP, $sformatf("Bcc %0d first pass", cc));
        issue(21'h300, w, 16'h0);
        chk(pc_q == (taken ? 21'h30C : 21'h302) && stall_q == 0,
            $sformatf("Bcc %0d status %h second pass pc %h", cc, status, pc_q));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
