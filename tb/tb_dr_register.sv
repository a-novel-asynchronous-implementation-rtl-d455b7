// tb_dr_register: random 4-phase writes to an 8-bit dual-rail register with
// two read ports. A write with we = 1 must store the value, a write with
// we = 0 must leave it; each must be acknowledged exactly one delay after
// the codeword is complete, and the acknowledge must fall one delay after
// the codeword is null. Read ports must show the stored value while their
// read strobe is high and null while it is low. Also checks the reset value.
// The expected values are computed in the testbench itself, independently of
// the design; stimulus and checks are this testbench's own.
`timescale 1ns/1ps
module tb_dr_register;
  logic clk = 0, rst = 1;
  logic [7:0] w_t = '0, w_f = '0;
  logic we_t = 0, we_f = 0, w_ack;
  logic [1:0] rd = '0;
  logic [1:0][7:0] r_t, r_f;
  logic [7:0] q;
  int unsigned checks = 0, failures = 0;

  dr_register #(.W(8), .NR(2), .RESET_VAL(8'hA5)) dut (.clk, .rst, .w_t, .w_f, .we_t, .we_f, .w_ack, .rd, .r_t, .r_f, .q);
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
    logic [7:0] model;
    repeat (2) @(posedge clk);
    rst = 0;
    model = 8'hA5;
    #1 chk(q == model, "reset value");
    for (int i = 0; i < 300; i++) begin
      logic [7:0] v;
      bit we;
      v = 8'($urandom); we = 1'($urandom_range(0, 2) != 0);
      @(negedge clk);
      w_t = v; w_f = ~v; we_t = we; we_f = !we;
      #1 chk(w_ack == 0, "ack before write");
      @(posedge clk); #1;
      chk(w_ack == 1, "ack one delay after write");
      if (we) model = v;
      chk(q == model, $sformatf("stored %h model %h", q, model));
      @(negedge clk); w_t = '0; w_f = '0; we_t = 0; we_f = 0;
      @(posedge clk); #1;
      chk(w_ack == 0, "ack falls after null");
      rd = 2'($urandom_range(0, 3));
      #1;
      chk(r_t[0] == (rd[0] ? model : 8'h00) && r_f[0] == (rd[0] ? ~model : 8'h00), "read port 0");
      chk(r_t[1] == (rd[1] ? model : 8'h00) && r_f[1] == (rd[1] ? ~model : 8'h00), "read port 1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
