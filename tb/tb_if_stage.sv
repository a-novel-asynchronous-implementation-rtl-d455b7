// tb_if_stage: the fetch stage with a behavioural PC register read port,
// a 1024-word program array and a testbench-driven IF/ID latch acknowledge.
// For random PC values it checks that Read (pc_rd) follows the inverse of
// the latch acknowledge, that the output codeword {pc, word1, word0} is the
// PC and the two program words at it, that it is complete DELAY + 1 periods
// after Read rises (DELAY = 4), and that it returns to null after the
// acknowledge, within DELAY + 1 periods.
// The expected values are computed in the testbench itself, independently of
// the design; stimulus and checks are this testbench's own.
`timescale 1ns/1ps
module tb_if_stage;
  import pic18_pkg::*;
  localparam int D = 4;
  logic clk = 0, rst = 1, run = 0, l1_ack = 0, pc_rd;
  logic [PC_W-1:0] pc = '0, pc_t, pc_f;
  logic [9:0] rom_addr;
  logic [31:0] rom_rdata;
  logic [PC_W+31:0] out_t, out_f;
  logic [15:0] rom [1024];
  int unsigned checks = 0, failures = 0;

  if_stage #(.MEM_DELAY(D), .ROM_AW(10)) dut (.clk, .rst, .run, .l1_ack, .pc_rd, .pc_t, .pc_f,
    .rom_addr, .rom_rdata, .out_t, .out_f);
  assign pc_t = pc & {PC_W{pc_rd}};
  assign pc_f = ~pc & {PC_W{pc_rd}};
  assign rom_rdata = {rom[rom_addr + 10'd1], rom[rom_addr]};
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
    foreach (rom[i]) rom[i] = 16'($urandom);
    repeat (2) @(posedge clk);
    rst = 0;
    #1 chk(pc_rd == 0, "no read while run is low");
    for (int i = 0; i < 200; i++) begin
      logic [PC_W+31:0] exp;
      int n, w;
      pc = {11'h0, 9'($urandom), 1'b0};
      w = pc[10:1];
      exp = {pc, rom[(w + 1) % 1024], rom[w]};
      @(negedge clk); run = 1;
      #1 chk(pc_rd == 1, "read rises when latch empty");
      n = 0;
      do begin @(posedge clk); #1; n++; end while (!(&(out_t | out_f)) && n < 30);
      chk(out_t == exp && out_f == ~exp, $sformatf("fetch at %h", pc));
      chk(n == D + 1, $sformatf("fetch latency %0d", n));
      @(negedge clk); l1_ack = 1;
      #1 chk(pc_rd == 0, "read falls on acknowledge");
      n = 0;
      while ((|(out_t | out_f)) && n < 30) begin @(posedge clk); #1; n++; end
      chk(out_t == 0 && out_f == 0 && n <= D + 1, $sformatf("return to null in %0d", n));
      @(negedge clk); l1_ack = 0; run = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
