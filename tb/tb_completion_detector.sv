// tb_completion_detector: makes the bits of a 6-bit dual-rail codeword valid
// one by one in random order, then null one by one. `done` must rise exactly
// one delay after the last bit became valid and fall exactly one delay after
// the last bit returned to null.
// The expected values are computed in the testbench itself, independently of
// the design; stimulus and checks are this testbench's own.
`timescale 1ns/1ps
module tb_completion_detector;
  localparam int W = 6;
  logic clk = 0, rst = 1;
  logic [W-1:0] d_t = '0, d_f = '0;
  logic done;
  int unsigned checks = 0, failures = 0;

  completion_detector #(.W(W)) dut (.clk, .rst, .d_t, .d_f, .done);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int order [W];
    repeat (2) @(posedge clk);
    rst = 0;
    for (int r = 0; r < 50; r++) begin
      foreach (order[i]) order[i] = i;
      order.shuffle();
      for (int i = 0; i < W; i++) begin
        @(negedge clk);
        if ($urandom_range(0, 1)) d_t[order[i]] = 1; else d_f[order[i]] = 1;
        @(posedge clk); #1;
        chk(done == (i == W - 1), $sformatf("rise step %0d done=%b", i, done));
      end
      order.shuffle();
      for (int i = 0; i < W; i++) begin
        @(negedge clk);
        d_t[order[i]] = 0; d_f[order[i]] = 0;
        @(posedge clk); #1;
        chk(done == (i != W - 1), $sformatf("fall step %0d done=%b", i, done));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
