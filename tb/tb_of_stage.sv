// tb_of_stage: the operand-fetch stage with behavioural register read ports
// and a 4096-byte data array behind its memory interface. Random ID/OF
// bundles (file operands in the access bank, in the BSR bank, at mapped
// SFR addresses and at MOVFF absolute addresses; literals; bit operations)
// are presented one at a time; the OF/EX bundle must carry the right source
// 1, source 2 (WREG or one-hot bit mask), STATUS, destination address and
// mapped destination register. It also checks that the memory is read
// (DELAY + 1 periods) only for unmapped file operands and skipped otherwise.
// The expected values are computed in the testbench itself, independently of
// the design; stimulus and checks are this testbench's own.
`timescale 1ns/1ps
module tb_of_stage;
  import pic18_pkg::*;
  localparam int D = 4;
  logic clk = 0, rst = 1;
  logic [ID_OF_W-1:0] in_t = '0, in_f = '0;
  logic rd;
  logic [39:0] regs, regs_t, regs_f;
  logic [11:0] mem_addr;
  logic [7:0] mem_rdata;
  logic [OF_EX_W-1:0] out_t, out_f;
  logic [7:0] ram [4096];
  int unsigned checks = 0, failures = 0, n_mem = 0, n_skip = 0;

  of_stage #(.MEM_DELAY(D)) dut (.clk, .rst, .in_t, .in_f, .rd, .regs_t, .regs_f,
    .mem_addr, .mem_rdata, .out_t, .out_f);
  assign regs_t = regs & {40{rd}};
  assign regs_f = ~regs & {40{rd}};
  assign mem_rdata = ram[mem_addr];
  always #5 clk = ~clk;

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
    foreach (ram[i]) ram[i] = 8'($urandom);
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 400; i++) begin
      id_of_t c;
      of_ex_t o;
      logic [7:0] wreg, status, bsr, prodl, prodh, exp_s1, exp_s2;
      logic [11:0] sa, da;
      int n, kind;
      bit uses_mem;
      wreg = 8'($urandom); status = 8'($urandom); bsr = 8'($urandom_range(0, 15));
      prodl = 8'($urandom); prodh = 8'($urandom);
      regs = {prodh, prodl, bsr, status, wreg};
      c = '0;
      c.op = alu_op_e'($urandom_range(1, 26));
      c.dst = dst_e'($urandom_range(0, 4));
      c.s2_is_w = 1'($urandom_range(0, 1));
      c.bit_n = 3'($urandom);
      c.k = 8'($urandom);
      c.access = 1'($urandom_range(0, 1));
      kind = $urandom_range(0, 4);
      case (kind)
        0: begin c.src = SRC_FILE; c.faddr = 12'($urandom_range(0, 255)); end
        1: begin c.src = SRC_FILE; c.access = 0;
                 c.faddr = 12'({8'hE8, 8'hD8, 8'hE0, 8'hF3, 8'hF4} >> (8 * $urandom_range(0, 4))) & 12'hFF; end
        2: begin c.src = SRC_ABS; c.faddr = 12'($urandom); c.fd_abs = 1; c.fdaddr = 12'($urandom); end
        3: c.src = SRC_LIT;
        default: c.src = SRC_NONE;
      endcase
      if (c.src == SRC_ABS) sa = c.faddr;
      else if (c.access) sa = {bsr[3:0], c.faddr[7:0]};
      else sa = c.faddr[7] ? {4'hF, c.faddr[7:0]} : {4'h0, c.faddr[7:0]};
      da = c.fd_abs ? c.fdaddr : sa;
      uses_mem = 0;
      case (c.src)
        SRC_LIT:  exp_s1 = c.k;
        SRC_NONE: exp_s1 = 8'h00;
        default:
          case (sa)
            12'hFE8: exp_s1 = wreg;
            12'hFD8: exp_s1 = status;
            12'hFE0: exp_s1 = bsr;
            12'hFF3: exp_s1 = prodl;
            12'hFF4: exp_s1 = prodh;
            default: begin exp_s1 = ram[sa]; uses_mem = 1; end
          endcase
      endcase
      exp_s2 = c.s2_is_w ? wreg : 8'(1 << c.bit_n);
      @(negedge clk); in_t = c; in_f = ~in_t;
      n = 0;
      do begin @(posedge clk); #1; n++; end while (!(&(out_t | out_f)) && n < 50);
      o = of_ex_t'(out_t);
      chk(o.s1 == exp_s1, $sformatf("s1 %h exp %h (src %0d addr %h)", o.s1, exp_s1, c.src, sa));
      chk(o.s2 == exp_s2 && o.status == status && o.op == c.op && o.dst == c.dst, "s2/status/op/dst");
      chk(o.daddr == da, $sformatf("daddr %h exp %h", o.daddr, da));
      chk(o.dreg == (da == 12'hFE8 ? R_WREG : da == 12'hFD8 ? R_STATUS : da == 12'hFE0 ? R_BSR :
                     da == 12'hFF3 ? R_PRODL : da == 12'hFF4 ? R_PRODH : R_MEM), "dreg");
      chk(out_f == ~out_t, "codeword well formed");
      // request (1) + memory interface (DELAY + 1 or 1) + output (1)
      chk(n == (uses_mem ? D + 3 : 3), $sformatf("latency %0d uses_mem %b", n, uses_mem));
      if (uses_mem) n_mem++; else n_skip++;
      @(negedge clk); in_t = '0; in_f = '0;
      n = 0;
      do begin @(posedge clk); #1; n++; end while ((|(out_t | out_f)) && n < 50);
      chk(out_t == 0 && out_f == 0, "null");
    end
    chk(n_mem > 0 && n_skip > 0, "memory read and skip both exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
