// tb_mem_read_if: the dual-rail read interface in front of a 256-byte
// memory array held by the testbench. Random requests with en = 1 must
// return the stored byte exactly DELAY + 1 periods after the request is
// complete (DELAY = 4); requests with en = 0 must return 0 one period after.
// The output must stay constant while the address returns to null and go
// null afterwards.
// The expected values are computed in the testbench itself, independently of
// the design; stimulus and checks are this testbench's own.
`timescale 1ns/1ps
module tb_mem_read_if;
  localparam int D = 4;
  logic clk = 0, rst = 1;
  logic [7:0] a_t = '0, a_f = '0, mem_addr, mem_rdata, d_t, d_f;
  logic en_t = 0, en_f = 0;
  logic [7:0] mem [256];
  int unsigned checks = 0, failures = 0;

  mem_read_if #(.AW(8), .DW(8), .DELAY(D)) dut (.clk, .rst, .a_t, .a_f, .en_t, .en_f,
    .mem_addr, .mem_rdata, .d_t, .d_f);
  assign mem_rdata = mem[mem_addr];
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
    foreach (mem[i]) mem[i] = 8'($urandom);
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 300; i++) begin
      logic [7:0] ad, exp;
      bit en;
      int n;
      ad = 8'($urandom); en = 1'($urandom_range(0, 3) != 0);
      exp = en ? mem[ad] : 8'h00;
      @(negedge clk); a_t = ad; a_f = ~ad; en_t = en; en_f = !en;
      n = 0;
      do begin @(posedge clk); #1; n++; end while (!(&(d_t | d_f)) && n < 20);
      chk(d_t == exp && d_f == ~exp, $sformatf("data %h exp %h", d_t, exp));
      chk(n == (en ? D + 1 : 1), $sformatf("latency %0d (en=%b)", n, en));
      @(negedge clk); a_t = '0; a_f = '0; en_t = 0; en_f = 0;
      @(posedge clk); #1;
      chk(d_t == exp || (d_t == 0 && d_f == 0), "output stable while address returns");
      n = 0;
      while ((|(d_t | d_f)) && n < 20) begin @(posedge clk); #1; n++; end
      chk(d_t == 0 && d_f == 0, "output null");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
