// tb_mem_write_if: the dual-rail write interface in front of a 256-byte
// memory array held by the testbench. Random write requests (we = 1) must
// write the byte and be acknowledged DELAY + 1 periods after they are
// complete; requests with we = 0 must not write and be acknowledged one
// period after. The acknowledge must fall after the request is null. At the
// end the whole array is compared with a model.
// The expected values are computed in the testbench itself, independently of
// the design; stimulus and checks are this testbench's own.
`timescale 1ns/1ps
module tb_mem_write_if;
  localparam int D = 4;
  logic clk = 0, rst = 1;
  logic [7:0] a_t = '0, a_f = '0, wd_t = '0, wd_f = '0, mem_addr, mem_wdata;
  logic we_t = 0, we_f = 0, mem_we, ack;
  logic [7:0] mem [256], model [256];
  int unsigned checks = 0, failures = 0;

  mem_write_if #(.AW(8), .DW(8), .DELAY(D)) dut (.clk, .rst, .a_t, .a_f, .wd_t, .wd_f, .we_t, .we_f,
    .mem_addr, .mem_wdata, .mem_we, .ack);
  always @(posedge clk) if (mem_we) mem[mem_addr] <= mem_wdata;
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
    int bad;
    foreach (mem[i]) begin mem[i] = 8'h00; model[i] = 8'h00; end
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 300; i++) begin
      logic [7:0] ad, v;
      bit we;
      int n;
      ad = 8'($urandom); v = 8'($urandom); we = 1'($urandom_range(0, 3) != 0);
      if (we) model[ad] = v;
      @(negedge clk); a_t = ad; a_f = ~ad; wd_t = v; wd_f = ~v; we_t = we; we_f = !we;
      n = 0;
      do begin @(posedge clk); #1; n++; end while (!ack && n < 20);
      chk(n == (we ? D + 1 : 1), $sformatf("ack latency %0d (we=%b)", n, we));
      @(negedge clk); a_t = '0; a_f = '0; wd_t = '0; wd_f = '0; we_t = 0; we_f = 0;
      n = 0;
      while (ack && n < 20) begin @(posedge clk); #1; n++; end
      chk(!ack, "ack falls");
    end
    bad = 0;
    foreach (mem[i]) if (mem[i] != model[i]) bad++;
    chk(bad == 0, $sformatf("%0d bytes differ", bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
