// tb_dr_mux2: all eight combinations of s, a, b, with the three inputs
// made valid in random order. The output must stay null until the last
// input is valid, then show s ? a : b within two delays, hold while the
// inputs return to null one by one, and be null two delays after the last.
// The expected values are computed in the testbench itself, independently of
// the design; stimulus and checks are this testbench's own.
`timescale 1ns/1ps
module tb_dr_mux2;
  logic clk = 0, rst = 1;
  logic [2:0] in_t = '0, in_f = '0;   // {s, a, b}
  logic y_t, y_f;
  int unsigned checks = 0, failures = 0;

  dr_mux2 dut (.clk, .rst, .s_t(in_t[2]), .s_f(in_f[2]), .a_t(in_t[1]), .a_f(in_f[1]),
               .b_t(in_t[0]), .b_f(in_f[0]), .y_t, .y_f);
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
    int order [3];
    repeat (2) @(posedge clk);
    rst = 0;
    for (int r = 0; r < 80; r++) begin
      logic [2:0] v;
      bit exp;
      v = 3'(r % 8);
      exp = v[2] ? v[1] : v[0];
      order = '{0, 1, 2};
      order.shuffle();
      for (int i = 0; i < 3; i++) begin
        @(negedge clk); in_t[order[i]] = v[order[i]]; in_f[order[i]] = !v[order[i]];
        if (i < 2) begin repeat (3) @(posedge clk); #1 chk(!y_t && !y_f, "output before all inputs"); end
      end
      repeat (2) @(posedge clk); #1;
      chk(y_t == exp && y_f == !exp, $sformatf("s=%b a=%b b=%b -> %b%b", v[2], v[1], v[0], y_t, y_f));
      order.shuffle();
      for (int i = 0; i < 3; i++) begin
        @(negedge clk); in_t[order[i]] = 0; in_f[order[i]] = 0;
        if (i < 2) begin repeat (3) @(posedge clk); #1 chk(y_t == exp && y_f == !exp, "hold"); end
      end
      repeat (2) @(posedge clk); #1;
      chk(!y_t && !y_f, "null");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
