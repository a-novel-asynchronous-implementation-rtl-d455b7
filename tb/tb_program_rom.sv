// tb_program_rom: loads random words through the load port (default size,
// 1024 words) and reads them back through both read ports, including the
// wrap of the second port at the last index.
// The expected values are computed in the testbench itself, independently of
// the design; stimulus and checks are this testbench's own.
`timescale 1ns/1ps
module tb_program_rom;
  localparam int WORDS = 1024;
  logic clk = 0;
  logic [9:0] addr = '0, ld_addr = '0;
  logic [15:0] word0, word1, ld_data = '0;
  logic ld_we = 0;
  logic [15:0] model [WORDS];
  int unsigned checks = 0, failures = 0;

  program_rom dut (.clk, .addr, .word0, .word1, .ld_we, .ld_addr, .ld_data);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    addr = 10'd5;
    #1;
    checks++; if (word0 != 0) begin failures++; $display("FAIL initial content"); end
    for (int i = 0; i < WORDS; i++) begin
      model[i] = 16'($urandom);
      @(negedge clk); ld_we = 1; ld_addr = 10'(i); ld_data = model[i];
    end
    @(negedge clk); ld_we = 0;
    for (int i = 0; i < 2000; i++) begin
      int a;
      a = (i < WORDS) ? i : $urandom_range(0, WORDS - 1);
      addr = 10'(a);
      #1;
      checks++;
      if (word0 != model[a] || word1 != model[(a + 1) % WORDS]) begin
        failures++; $display("FAIL addr %0d", a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
