// tb_matched_delay: a random input waveform must reappear at the output
// exactly DELAY clk periods later (DELAY = 4, the design default): a change
// made between two edges is sampled by the next edge and shows DELAY - 1
// edges after that one.
// The expected values are computed in the testbench itself, independently of
// the design; stimulus and checks are this testbench's own.
`timescale 1ns/1ps
module tb_matched_delay;
  localparam int D = 4;
  logic clk = 0, rst = 1, in = 0, out;
  logic hist [$];
  int unsigned checks = 0, failures = 0;

  matched_delay #(.DELAY(D)) dut (.clk, .rst, .in, .out);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < D - 1; i++) hist.push_back(1'b0);
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      in = 1'($urandom_range(0, 1));
      hist.push_back(in);
      @(posedge clk); #1;
      checks++;
      if (out != hist[0]) begin failures++; $display("FAIL step %0d", i); end
      void'(hist.pop_front());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
