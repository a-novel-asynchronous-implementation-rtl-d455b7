// tb_data_ram: random writes to the 4096-byte data memory (default size),
// then reads through the read port and the debug port, compared with a
// model; also checks the all-zero initial content.
// The expected values are computed in the testbench itself, independently of
// the design; stimulus and checks are this testbench's own.
`timescale 1ns/1ps
module tb_data_ram;
  logic clk = 0;
  logic [11:0] raddr = '0, waddr = '0, dbg_addr = '0;
  logic [7:0] rdata, wdata = '0, dbg_data;
  logic we = 0;
  logic [7:0] model [4096];
  int unsigned checks = 0, failures = 0;

  data_ram dut (.clk, .raddr, .rdata, .we, .waddr, .wdata, .dbg_addr, .dbg_data);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bad0 = 0;
    foreach (model[i]) model[i] = 8'h00;
    for (int i = 0; i < 4096; i += 17) begin raddr = 12'(i); #1; if (rdata != 0) bad0++; end
    checks++; if (bad0 != 0) begin failures++; $display("FAIL initial content"); end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we = 1'($urandom_range(0, 3) != 0); waddr = 12'($urandom); wdata = 8'($urandom);
      if (we) model[waddr] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 4096; i++) begin
      raddr = 12'(i); dbg_addr = 12'(4095 - i);
      #1;
      checks++;
      if (rdata != model[i] || dbg_data != model[4095 - i]) begin failures++; $display("FAIL at %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
