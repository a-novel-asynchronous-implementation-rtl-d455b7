// tb_async_pic18: end-to-end test of the asynchronous PIC18 at its default
// parameters.
//
// Each program is loaded into the program ROM through the load port, the
// processor is started, and once it sits in its final `BRA $` loop the
// architectural state (WREG, STATUS, BSR, PROD, STKPTR and the whole data
// memory) is compared with the instruction-level model pic18_iss, which runs
// the same program. Programs:
//   1. the counting loop MOVLW 1 / MOVWF 0 / ADDWF 0,W / GOTO 4, checked by
//      the sequence of WREG values it produces;
//   2. a control-flow program: CALL, nested RCALL, RETURN, PUSH, POP, BRA,
//      GOTO, MOVFF through mapped registers;
//   3. a recursive subroutine that fills all 32 stack levels and unwinds,
//      checked by the deepest STKPTR seen and the frame count it leaves;
//   4. random programs mixing every implemented byte, bit and literal
//      instruction, MULWF/MULLW, MOVLB, MOVFF, banked and access-bank
//      addressing, mapped SFRs and conditional branches that skip one
//      instruction right after a flag-setting instruction, subroutine
//      calls (RCALL/RETURN) and PUSH/POP pairs.
// The testbench counts how often the mechanisms of the design occur
// (stall and refetch of conditional branches, taken and untaken branches,
// stack pushes and pops, data memory reads, memory bypass for registers and
// literals, memory writes, pipeline overlap) and fails if one never does.
// It also reports the average number of time-base periods per instruction.
// The expected values are computed in the testbench itself, independently of
// the design; stimulus and checks are this testbench's own.
`timescale 1ns/1ps
module tb_async_pic18;
  import pic18_iss::*;

  localparam int unsigned ROM_WORDS = 1024;
  localparam int unsigned N_RANDOM  = 12;
  localparam int unsigned RAND_LEN  = 150;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        run = 1'b0;
  logic        ld_we = 1'b0;
  logic [9:0]  ld_addr = '0;
  logic [15:0] ld_data = '0;
  logic [20:0] dbg_pc;
  logic [7:0]  dbg_wreg, dbg_status, dbg_bsr, dbg_data;
  logic [15:0] dbg_prod;
  logic [5:0]  dbg_stkptr;
  logic        dbg_stall, retire;
  logic [11:0] dbg_addr = '0;

  async_pic18 dut (
    .clk, .rst, .run, .ld_we, .ld_addr, .ld_data,
    .dbg_pc, .dbg_wreg, .dbg_status, .dbg_bsr, .dbg_prod, .dbg_stkptr, .dbg_stall,
    .dbg_addr, .dbg_data, .retire
  );

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  longint unsigned ticks = 0;

  // mechanism counters
  int unsigned n_stall = 0, n_retire = 0, n_memrd = 0, n_bypass = 0, n_memwr = 0, n_overlap = 0;
  int unsigned n_taken = 0, n_untaken = 0, n_push = 0, n_pop = 0;
  logic p_stall = 0, p_retire = 0, p_rd = 0, p_byp = 0, p_wr = 0;
  int unsigned max_sp = 0;

  always @(posedge clk) begin
    ticks++;
    if (dbg_stall && !p_stall) n_stall++;
    if (retire && !p_retire) n_retire++;
    if (dut.u_of.u_ram_if.dly && !p_rd) n_memrd++;
    if (dut.u_of.req_f[12] && !p_byp) n_bypass++;
    if (dut.ram_we && !p_wr) n_memwr++;
    if (dut.l1_ack && dut.l3_ack) n_overlap++;
    if (int'(dbg_stkptr) > max_sp) max_sp = int'(dbg_stkptr);
    p_stall  <= dbg_stall;
    p_retire <= retire;
    p_rd     <= dut.u_of.u_ram_if.dly;
    p_byp    <= dut.u_of.req_f[12];
    p_wr     <= dut.ram_we;
  end

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  // ---------------- instruction encoders ----------------
  function automatic logic [15:0] e_byte(int unsigned op6, bit d, bit a, int unsigned f);
    return 16'((op6 << 10) | (d << 9) | (a << 8) | (f & 'hFF));
  endfunction
  function automatic logic [15:0] e_lit(int unsigned op8, int unsigned k);
    return 16'((op8 << 8) | (k & 'hFF));
  endfunction
  function automatic logic [15:0] e_bra(int signed n);
    return 16'(16'hD000 | (n & 'h7FF));
  endfunction
  function automatic logic [15:0] e_rcall(int signed n);
    return 16'(16'hD800 | (n & 'h7FF));
  endfunction

  logic [15:0] prog [ROM_WORDS];
  int unsigned plen;
  iss_c        iss;

  function automatic void emit(logic [15:0] w);
    prog[plen] = w;
    plen++;
  endfunction
  function automatic void emit_goto(int unsigned target, bit call);
    emit(16'(call ? (16'hEC00 | ((target >> 1) & 'hFF)) : (16'hEF00 | ((target >> 1) & 'hFF))));
    emit(16'(16'hF000 | ((target >> 9) & 'hFFF)));
  endfunction

  task automatic load_and_start();
    run = 1'b0;
    rst = 1'b1;
    repeat (3) @(posedge clk);
    for (int i = 0; i < ROM_WORDS; i++) begin
      ld_we <= 1'b1; ld_addr <= 10'(i); ld_data <= (i < int'(plen)) ? prog[i] : 16'h0000;
      @(posedge clk);
    end
    ld_we <= 1'b0;
    // the data memory is not cleared: each program starts from the memory
    // the previous one left, in the design and in the model alike
    rst <= 1'b0;
    @(posedge clk);
    run <= 1'b1;
  endtask

  // run until the PC has been parked at `halt` long enough for the pipeline to drain
  task automatic run_to_halt(int unsigned halt, output longint unsigned t_used);
    int unsigned same;
    longint unsigned t0;
    t0 = ticks;
    same = 0;
    while (same < 400 && ticks - t0 < 400000) begin
      @(posedge clk);
      if (dbg_pc == 21'(halt)) same++; else same = 0;
    end
    t_used = ticks - t0;
    check(dbg_pc == 21'(halt), $sformatf("program did not reach halt address %0h (pc=%0h)", halt, dbg_pc));
  endtask

  task automatic compare_state(string tag);
    int unsigned bad;
    check(dbg_wreg == 8'(iss.w), $sformatf("%s: WREG %0h, model %0h", tag, dbg_wreg, iss.w));
    check(dbg_status == 8'(iss.status), $sformatf("%s: STATUS %0h, model %0h", tag, dbg_status, iss.status));
    check(dbg_bsr == 8'(iss.bsr), $sformatf("%s: BSR %0h, model %0h", tag, dbg_bsr, iss.bsr));
    check(dbg_prod == 16'((iss.prodh << 8) | iss.prodl), $sformatf("%s: PROD %0h, model %0h%0h", tag, dbg_prod, iss.prodh, iss.prodl));
    check(dbg_stkptr == 6'(iss.sp), $sformatf("%s: STKPTR %0d, model %0d", tag, dbg_stkptr, iss.sp));
    bad = 0;
    for (int a = 0; a < 4096; a++) begin
      dbg_addr = 12'(a);
      #0.1;
      if (dbg_data != iss.ram[a]) begin
        if (bad < 4) $display("%s: ram[%0h] = %0h, model %0h", tag, a, dbg_data, iss.ram[a]);
        bad++;
      end
    end
    check(bad == 0, $sformatf("%s: %0d data memory bytes differ", tag, bad));
  endtask

  task automatic model_run(int unsigned halt);
    int unsigned guard = 0;
    while (iss.pc != halt && guard < 100000) begin iss.step(); guard++; end
    n_taken   += iss.n_taken;   iss.n_taken = 0;
    n_untaken += iss.n_untaken; iss.n_untaken = 0;
    n_push    += iss.n_push;    iss.n_push = 0;
    n_pop     += iss.n_pop;     iss.n_pop = 0;
  endtask

  function automatic void model_load();
    iss.pc = 0; iss.w = 0; iss.status = 0; iss.bsr = 0; iss.prodl = 0; iss.prodh = 0; iss.sp = 0;
    iss.n_instr = 0;
    for (int i = 0; i < ROM_WORDS; i++) iss.rom[i] = (i < int'(plen)) ? prog[i] : 16'h0000;
  endfunction

  // ---------------- random program generator ----------------
  int unsigned byte_ops [16] = '{'h01, 'h04, 'h05, 'h06, 'h07, 'h08, 'h09, 'h0A,
                                  'h0C, 'h0D, 'h10, 'h11, 'h14, 'h15, 'h16, 'h17};
  int unsigned lit_ops [7]   = '{'h08, 'h09, 'h0A, 'h0B, 'h0D, 'h0E, 'h0F};
  int unsigned sfr_f [5]     = '{'hE8, 'hD8, 'hE0, 'hF3, 'hF4};

  function automatic void pick_file(output bit a, output int unsigned f);
    int unsigned r = $urandom_range(0, 9);
    if (r < 5)      begin a = 0; f = $urandom_range(0, 7); end
    else if (r < 8) begin a = 1; f = $urandom_range(0, 7); end
    else if (r < 9) begin a = 0; f = 'h90 + $urandom_range(0, 3); end
    else            begin a = 0; f = sfr_f[$urandom_range(0, 4)]; end
  endfunction

  function automatic void gen_single();
    int unsigned kind = $urandom_range(0, 99);
    bit a, d;
    int unsigned f;
    pick_file(a, f);
    d = 1'($urandom_range(0, 1));
    if (kind < 45) begin
      if (a == 0 && f == 'hD8) d = 0;           // no flag-setting write into STATUS
      emit(e_byte(byte_ops[$urandom_range(0, 15)], d, a, f));
    end else if (kind < 55) begin
      int unsigned op7 = $urandom_range(0, 4);  // MULWF SETF CLRF NEGF MOVWF
      if (a == 0 && f == 'hD8 && (op7 == 2 || op7 == 3)) op7 = 4;
      case (op7)
        0: emit(16'(16'h0200 | (a << 8) | f));
        1: emit(16'(16'h6800 | (a << 8) | f));
        2: emit(16'(16'h6A00 | (a << 8) | f));
        3: emit(16'(16'h6C00 | (a << 8) | f));
        default: emit(16'(16'h6E00 | (a << 8) | f));
      endcase
    end else if (kind < 65) begin
      int unsigned bop = $urandom_range(7, 9);  // BTG BSF BCF
      emit(16'((bop << 12) | ($urandom_range(0, 7) << 9) | (a << 8) | f));
    end else if (kind < 90) begin
      emit(e_lit(lit_ops[$urandom_range(0, 6)], $urandom_range(0, 255)));
    end else begin
      int unsigned b = $urandom_range(0, 4);
      emit(16'(16'h0100 | (b == 4 ? 15 : b)));  // MOVLB
    end
  endfunction

  function automatic int unsigned gen_random_program();
    plen = 0;
    for (int i = 0; i < int'(RAND_LEN); i++) begin
      int unsigned r = $urandom_range(0, 99);
      if (r < 15) begin
        emit(16'(16'hE001 | ($urandom_range(0, 7) << 8)));   // Bcc +1: skip next
        gen_single();
      end else if (r < 20) begin
        int unsigned src, dst;
        src = ($urandom_range(0, 1) << 8) | $urandom_range(0, 7);
        dst = ($urandom_range(0, 3) == 0) ? 'hFE8 : (($urandom_range(0, 1) << 8) | $urandom_range(0, 7));
        if ($urandom_range(0, 3) == 0) src = 'hFF0 + 3 + $urandom_range(0, 1);
        emit(16'(16'hC000 | src));
        emit(16'(16'hF000 | dst));
      end else if (r < 24) begin
        int unsigned body = $urandom_range(1, 3);
        emit(e_rcall(1));                                     // call the body below
        emit(e_bra(int'(body) + 1));                          // after RETURN: jump past it
        for (int b = 0; b < int'(body); b++) gen_single();
        emit(16'h0012);                                       // RETURN
      end else if (r < 26) begin
        emit(16'h0005);                                       // PUSH
        gen_single();
        emit(16'h0006);                                       // POP
      end else begin
        gen_single();
      end
    end
    emit(16'hD7FF);                                           // BRA $
    return 2 * (plen - 1);
  endfunction

  // ---------------- tests ----------------
  initial begin
    longint unsigned t_used, t_total, i_total;
    int unsigned halt;
    iss = new(ROM_WORDS);
    t_total = 0; i_total = 0;

    // 1. counting loop: WREG <= WREG + f(0) every pass
    plen = 0;
    emit(e_lit('h0E, 1));          // MOVLW 1
    emit(16'h6E00);                // MOVWF 0x00, a=0
    emit(e_byte('h09, 0, 0, 0));   // ADDWF 0x00, W, a=0
    emit_goto(4, 0);               // GOTO 4
    load_and_start();
    begin
      logic [7:0] last;
      int unsigned seen;
      longint unsigned t0;
      last = dbg_wreg;
      seen = 0;
      t0 = ticks;
      while (seen < 20 && ticks - t0 < 100000) begin
        @(posedge clk);
        if (dbg_wreg != last) begin
          check(dbg_wreg == 8'(seen + 1), $sformatf("loop: WREG step %0d is %0d", seen, dbg_wreg));
          last = dbg_wreg;
          seen++;
        end
      end
      check(seen == 20, "loop: WREG did not count to 20");
      $display("counting loop: %0d increments in %0d periods", seen, ticks - t0);
    end
    run = 1'b0;
    iss.ram[0] = 8'h01;            // left in memory by the loop

    // 2. control flow
    plen = 0;
    emit(e_lit('h0E, 'h21));       // 0x00 MOVLW 0x21
    emit_goto('h40, 1);            // 0x02 CALL 0x40
    emit(e_rcall(('h50 - 'h08) / 2));   // 0x06 RCALL 0x50
    emit(16'h0005);                // 0x08 PUSH
    emit(16'h0005);                // 0x0A PUSH
    emit(16'h0006);                // 0x0C POP
    emit(e_bra(1));                // 0x0E BRA +1 (skip next)
    emit(e_lit('h0E, 'h77));       // 0x10 MOVLW 0x77 (skipped)
    emit(16'hC000 | 16'hFE8);      // 0x12 MOVFF WREG -> 0x0A
    emit(16'hF00A);
    emit(16'hC000 | 16'hFF3);      // 0x16 MOVFF PRODL -> 0x10B
    emit(16'hF10B);
    emit_goto('h60, 0);            // 0x1A GOTO 0x60
    while (plen < 'h20) emit(16'h0000);
    emit(e_byte('h09, 1, 0, 5));   // 0x40 ADDWF 0x05, F
    emit(e_rcall(('h50 - 'h44) / 2));   // 0x42 RCALL 0x50
    emit(e_lit('h0D, 'h03));       // 0x44 MULLW 3
    emit(16'h0012);                // 0x46 RETURN
    while (plen < 'h28) emit(16'h0000);
    emit(e_byte('h0A, 1, 0, 6));   // 0x50 INCF 0x06, F
    emit(16'h0012);                // 0x52 RETURN
    while (plen < 'h30) emit(16'h0000);
    emit(16'hD7FF);                // 0x60 BRA $
    halt = 'h60;
    model_load();
    model_run(halt);
    load_and_start();
    run_to_halt(halt, t_used);
    compare_state("control");
    run = 1'b0;

    // 3. recursion to the full stack depth: sub decrements f(0x20) and calls
    //    itself until it reaches 0, then every frame increments f(0x21) on
    //    its way out. Starting from 32 this nests exactly 32 return addresses.
    plen = 0;
    emit(e_lit('h0E, 32));         // 0x00 MOVLW 32
    emit(16'h6E20);                // 0x02 MOVWF 0x20
    emit(e_rcall(2));              // 0x04 RCALL sub (0x0A)
    emit(16'hD7FF);                // 0x06 BRA $
    emit(16'h0000);                // 0x08 NOP
    emit(e_byte('h01, 1, 0, 'h20));// 0x0A sub: DECF 0x20, F
    emit(16'hE001);                // 0x0C BZ +1 (skip the call at 0)
    emit(e_rcall(-3));             // 0x0E RCALL sub
    emit(e_byte('h0A, 1, 0, 'h21));// 0x10 INCF 0x21, F
    emit(16'h0012);                // 0x12 RETURN
    halt = 'h06;
    model_load();
    model_run(halt);
    max_sp = 0;
    load_and_start();
    run_to_halt(halt, t_used);
    compare_state("recursion");
    check(max_sp == 32, $sformatf("recursion: deepest STKPTR %0d, expected 32", max_sp));
    check(iss.ram['h21] == 32, "recursion: model did not unwind 32 frames");
    run = 1'b0;

    // 4. random programs
    for (int p = 0; p < int'(N_RANDOM); p++) begin
      halt = gen_random_program();
      model_load();
      model_run(halt);
      load_and_start();
      run_to_halt(halt, t_used);
      t_total += t_used; i_total += iss.n_instr;
      compare_state($sformatf("random %0d", p));
      run = 1'b0;
    end
    $display("random programs: %0d instructions, about %0d periods per instruction",
             i_total, i_total ? t_total / i_total : 0);

    $display("mechanisms: stall=%0d taken=%0d untaken=%0d push=%0d pop=%0d memrd=%0d bypass=%0d memwr=%0d overlap=%0d retire=%0d",
             n_stall, n_taken, n_untaken, n_push, n_pop, n_memrd, n_bypass, n_memwr, n_overlap, n_retire);
    check(n_stall > 0,   "no branch stall happened");
    check(n_taken > 0,   "no conditional branch was taken");
    check(n_untaken > 0, "no conditional branch fell through");
    check(n_push > 0,    "no stack push happened");
    check(n_pop > 0,     "no stack pop happened");
    check(n_memrd > 0,   "no data memory read happened");
    check(n_bypass > 0,  "no memory bypass happened");
    check(n_memwr > 0,   "no data memory write happened");
    check(n_overlap > 0, "IF/ID and EX/WB never held instructions at the same time");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
