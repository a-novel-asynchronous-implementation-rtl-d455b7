// tb_c_element: checks the 3-input C-element against the rule "rise when all
// inputs are high, fall when all are low, hold otherwise", one clk of delay,
// over random input sequences, and checks that reset clears the output.
// The expected values are computed in the testbench itself, independently of
// the design; stimulus and checks are this testbench's own.
`timescale 1ns/1ps
module tb_c_element;
  logic clk = 0, rst = 1;
  logic [2:0] in = '0;
  logic out, expect_out;
  int unsigned checks = 0, failures = 0;

  c_element #(.N(3)) dut (.clk, .rst, .in, .out);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in = 3'b111;
    @(posedge clk); @(posedge clk);
    #1;
    checks++; if (out !== 1'b0) begin failures++; $display("FAIL reset"); end
    rst = 0;
    expect_out = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      in = 3'($urandom_range(0, 7));
      if (i % 7 < 2) in = (i % 7 == 0) ? 3'b111 : 3'b000;
      if (in == 3'b111) expect_out = 1;
      else if (in == 3'b000) expect_out = 0;
      @(posedge clk); #1;
      checks++;
      if (out != expect_out) begin failures++; $display("FAIL in=%b out=%b exp=%b", in, out, expect_out); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
