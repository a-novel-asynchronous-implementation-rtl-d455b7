// tb_exwb_stage: the execute/write-back stage with behavioural write
// acknowledges (each channel answers a complete codeword after a random
// delay and drops its answer after the codeword is null). Random OF/EX
// bundles for every ALU operation and destination are applied; the values
// written to WREG, STATUS, BSR, PRODL, PRODH and data memory, and the write
// enables, are compared with the instruction-level reference model
// (pic18_iss), and the stage acknowledge must rise only after the slowest
// write has been acknowledged.
// The expected values are computed in the testbench itself, independently of
// the design; stimulus and checks are this testbench's own.
`timescale 1ns/1ps
module tb_exwb_stage;
  import pic18_pkg::*;
  import pic18_iss::*;
  logic clk = 0, rst = 1;
  logic [OF_EX_W-1:0] in_t = '0, in_f = '0;
  logic ack;
  logic [4:0] we_t, we_f, w_ack = '0;
  logic [39:0] wd_t, wd_f;
  logic mwe_t, mwe_f, m_ack = 0;
  logic [11:0] ma_t, ma_f;
  logic [7:0] md_t, md_f;
  int unsigned checks = 0, failures = 0;
  iss_c m;

  exwb_stage dut (.clk, .rst, .in_t, .in_f, .ack, .we_t, .we_f, .wd_t, .wd_f, .w_ack,
    .mwe_t, .mwe_f, .ma_t, .ma_f, .md_t, .md_f, .m_ack);
  always #5 clk = ~clk;

  // behavioural write acknowledges with random delay
  int unsigned dly [6];
  always @(posedge clk) begin
    for (int i = 0; i < 5; i++) begin
      if ((we_t[i] | we_f[i]) && &(wd_t[8*i +: 8] | wd_f[8*i +: 8])) begin
        if (dly[i] == 0) w_ack[i] <= 1; else dly[i]--;
      end else if (!(we_t[i] | we_f[i])) begin
        w_ack[i] <= 0; dly[i] = $urandom_range(0, 6);
      end
    end
    if (mwe_t | mwe_f) begin
      if (dly[5] == 0) m_ack <= 1; else dly[5]--;
    end else begin
      m_ack <= 0; dly[5] = $urandom_range(0, 6);
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    m = new(16);
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 600; i++) begin
      of_ex_t x;
      logic [7:0] r;
      logic [15:0] p;
      logic [7:0] st;
      int n;
      bit fl;
      x = '0;
      x.op = alu_op_e'($urandom_range(0, 26));
      x.s1 = 8'($urandom); x.s2 = 8'($urandom);
      if (x.op inside {OP_BCF, OP_BSF, OP_BTG}) x.s2 = 8'(1 << $urandom_range(0, 7));
      x.status = 8'($urandom) & 8'h1F;
      x.dst = dst_e'($urandom_range(0, 4));
      x.dreg = (x.dst == DST_F && $urandom_range(0, 3) == 0) ? R_WREG : R_MEM;
      x.daddr = 12'($urandom);
      // reference result from the instruction-level model
      m.status = x.status; m.w = x.s2;
      fl = 1;
      case (x.op)
        OP_ADD:    r = 8'(m.arith(x.s1, x.s2, 0));
        OP_ADDC:   r = 8'(m.arith(x.s1, x.s2, x.status & 1));
        OP_INC:    r = 8'(m.arith(x.s1, 1, 0));
        OP_DEC:    r = 8'(m.arith(x.s1, 'hFF, 0));
        OP_SUBWF, OP_SUBL: r = 8'(m.arith(x.s1, ~x.s2 & 'hFF, 1));
        OP_SUBWFB: r = 8'(m.arith(x.s1, ~x.s2 & 'hFF, x.status & 1));
        OP_SUBFWB: r = 8'(m.arith(x.s2, ~x.s1 & 'hFF, x.status & 1));
        OP_NEG:    r = 8'(m.arith(0, ~x.s1 & 'hFF, 1));
        OP_AND:    begin r = x.s1 & x.s2; m.set_zn(r); end
        OP_IOR:    begin r = x.s1 | x.s2; m.set_zn(r); end
        OP_XOR:    begin r = x.s1 ^ x.s2; m.set_zn(r); end
        OP_COM:    begin r = ~x.s1; m.set_zn(r); end
        OP_MOVF:   begin r = x.s1; m.set_zn(r); end
        OP_CLR:    begin r = 0; m.status |= 4; end
        OP_SET:    begin r = 8'hFF; fl = 0; end
        OP_RLC:    begin r = {x.s1[6:0], x.status[0]}; m.status = (m.status & ~1) | x.s1[7]; m.set_zn(r); end
        OP_RRC:    begin r = {x.status[0], x.s1[7:1]}; m.status = (m.status & ~1) | x.s1[0]; m.set_zn(r); end
        OP_RLNC:   begin r = {x.s1[6:0], x.s1[7]}; m.set_zn(r); end
        OP_RRNC:   begin r = {x.s1[0], x.s1[7:1]}; m.set_zn(r); end
        OP_BCF:    begin r = x.s1 & ~x.s2; fl = 0; end
        OP_BSF:    begin r = x.s1 | x.s2; fl = 0; end
        OP_BTG:    begin r = x.s1 ^ x.s2; fl = 0; end
        OP_PASSW:  begin r = x.s2; fl = 0; end
        default:   begin r = x.s1; fl = 0; end   // NOP, PASS, MUL
      endcase
      p = 16'(x.s1) * 16'(x.s2);
      st = 8'(m.status);
      @(negedge clk); in_t = x; in_f = ~in_t;
      n = 0;
      do begin @(posedge clk); #1; n++; end while (!ack && n < 60);
      chk(ack && (&w_ack) && m_ack, "ack only after every write acknowledge");
      chk(we_t[1] == fl && (!fl || wd_t[15:8] == st), $sformatf("op %0d STATUS %h exp %h", x.op, wd_t[15:8], st));
      chk(we_t[0] == (x.dst == DST_W || (x.dst == DST_F && x.dreg == R_WREG)), "WREG enable");
      if (we_t[0]) chk(wd_t[7:0] == r, $sformatf("op %0d result %h exp %h", x.op, wd_t[7:0], r));
      chk(we_t[2] == (x.dst == DST_BSR) && (!we_t[2] || wd_t[23:16] == {4'h0, r[3:0]}), "BSR");
      chk(we_t[3] == (x.dst == DST_PROD) && we_t[4] == (x.dst == DST_PROD), "PROD enables");
      if (x.dst == DST_PROD) chk({wd_t[39:32], wd_t[31:24]} == p, "PROD value");
      chk(mwe_t == (x.dst == DST_F && x.dreg == R_MEM), "memory enable");
      if (mwe_t) chk(ma_t == x.daddr && md_t == r, "memory address/data");
      @(negedge clk); in_t = '0; in_f = '0;
      n = 0;
      do begin @(posedge clk); #1; n++; end while (ack && n < 60);
      chk(!ack, "ack falls");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
