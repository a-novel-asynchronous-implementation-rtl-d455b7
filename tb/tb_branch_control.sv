// tb_branch_control: every condition code with random STATUS values. The
// inputs become valid, `taken` must become valid within 8 delays with the
// PIC18 branch condition (BZ, BNZ, BC, BNC, BOV, BNOV, BN, BNN), and after
// the inputs return to null it must return to null. Also checks that the
// output stays null while only STATUS is valid.
// The expected values are computed in the testbench itself, independently of
// the design; stimulus and checks are this testbench's own.
`timescale 1ns/1ps
module tb_branch_control;
  logic clk = 0, rst = 1;
  logic [7:0] status_t = '0, status_f = '0;
  logic [2:0] cc_t = '0, cc_f = '0;
  logic taken_t, taken_f;
  int unsigned checks = 0, failures = 0;

  branch_control dut (.clk, .rst, .status_t, .status_f, .cc_t, .cc_f, .taken_t, .taken_f);
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
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 400; i++) begin
      logic [7:0] st;
      logic [2:0] cc;
      bit exp;
      int n;
      st = 8'($urandom); cc = 3'(i % 8);
      case (cc)
        0: exp = st[2];  1: exp = !st[2];
        2: exp = st[0];  3: exp = !st[0];
        4: exp = st[3];  5: exp = !st[3];
        6: exp = st[4];  default: exp = !st[4];
      endcase
      @(negedge clk); status_t = st; status_f = ~st;
      repeat (8) @(posedge clk); #1;
      chk(!taken_t && !taken_f, "output before cc");
      @(negedge clk); cc_t = cc; cc_f = ~cc;
      n = 0;
      while (!(taken_t | taken_f) && n < 8) begin @(posedge clk); #1; n++; end
      chk(taken_t == exp && taken_f == !exp, $sformatf("cc=%0d st=%h taken=%b%b", cc, st, taken_t, taken_f));
      @(negedge clk); status_t = '0; status_f = '0; cc_t = '0; cc_f = '0;
      repeat (8) @(posedge clk); #1;
      chk(!taken_t && !taken_f, "null after inputs null");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
