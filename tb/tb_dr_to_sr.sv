// tb_dr_to_sr: random dual-rail codewords, completed bit by bit, must give
// the right single-rail value and a strobe that rises one delay after the
// last bit is valid and falls one delay after the codeword is null.
// The expected values are computed in the testbench itself, independently of
// the design; stimulus and checks are this testbench's own.
`timescale 1ns/1ps
module tb_dr_to_sr;
  logic clk = 0, rst = 1;
  logic [7:0] d_t = '0, d_f = '0, d;
  logic strobe;
  int unsigned checks = 0, failures = 0;

  dr_to_sr #(.W(8)) dut (.clk, .rst, .d_t, .d_f, .d, .strobe);
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
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 200; i++) begin
      logic [7:0] v;
      v = 8'($urandom);
      @(negedge clk); d_t[3:0] = v[3:0]; d_f[3:0] = ~v[3:0];
      @(posedge clk); #1 chk(strobe == 0, "strobe early");
      @(negedge clk); d_t[7:4] = v[7:4]; d_f[7:4] = ~v[7:4];
      @(posedge clk); #1 chk(strobe == 1, "strobe after complete");
      chk(d == v, $sformatf("value %h exp %h", d, v));
      @(negedge clk); d_t = '0; d_f = '0;
      @(posedge clk); #1 chk(strobe == 0, "strobe after null");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
