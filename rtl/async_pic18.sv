// async_pic18: asynchronous, pipelined, PIC18-compatible 8-bit processor.
//
// Four stages, IF, ID, OF and EX/WB, pass instructions to each other through
// 4-phase dual-rail Muller pipeline latches (L1 = IF/ID, L2 = ID/OF,
// L3 = OF/EX). No stage waits for a clock: each one starts when its input
// codeword is complete and the latch in front of it is empty, and the
// acknowledges of the latches pace the pipeline. The registers PC, Stall,
// WREG, STATUS, BSR, PRODL/PRODH and the return stack with STKPTR are
// dual-rail registers reached over direct paths (no shared bus); the
// program ROM and the data RAM are conventional memories behind dual-rail /
// single-rail converters with a matched delay.
// Ordering: the IF/ID pair is a loop through the PC register (a fetch starts
// only after ID has written the next PC). The latch discipline lets OF read
// registers and memory only after the instruction ahead has finished its
// write-back, so no bypass network is needed; the one remaining hazard,
// STATUS read by a conditional branch in ID, is covered by the Stall
// register (the branch is decoded twice).
// `clk` is not a pipeline clock: it is the unit-delay time base of the
// state-holding elements (C-elements, register cells, delay lines); every
// step of every handshake takes one or more of its periods.
// Interface: `run` enables fetching; ld_* fill the program ROM while run is
// low; the dbg_* ports show the architectural state; `retire` is the EX/WB
// acknowledge, which rises once per completed instruction pass.
// Following the original design: the four stages, the Muller latches between
// them, dual-rail registers on direct paths, memories behind converters and a
// matched delay, and the Stall register. Own choices: the unit-delay time
// base, the two-word fetch, PRODL/PRODH registers, the ROM size and memory
// delay, and the run/load ports.
module async_pic18
  import pic18_pkg::*;
#(
  parameter int unsigned ROM_WORDS   = 1024,
  parameter int unsigned RAM_BYTES   = 4096,
  parameter int unsigned STACK_DEPTH = 32,
  parameter int unsigned MEM_DELAY   = 4,
  localparam int unsigned ROM_AW     = $clog2(ROM_WORDS)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                run,
  input  logic                ld_we,
  input  logic [ROM_AW-1:0]   ld_addr,
  input  logic [15:0]         ld_data,
  output logic [PC_W-1:0]     dbg_pc,
  output logic [7:0]          dbg_wreg,
  output logic [7:0]          dbg_status,
  output logic [7:0]          dbg_bsr,
  output logic [15:0]         dbg_prod,
  output logic [SP_W-1:0]     dbg_stkptr,
  output logic                dbg_stall,
  input  logic [DADDR_W-1:0]  dbg_addr,
  output logic [7:0]          dbg_data,
  output logic                retire
);
  localparam int unsigned L1_W = PC_W + 32;

  // ---------------- IF ----------------
  logic                pc_rd;
  logic [PC_W-1:0]     pc_rt, pc_rf;
  logic [ROM_AW-1:0]   rom_addr;
  logic [15:0]         rom_w0, rom_w1;
  logic [L1_W-1:0]     if_t, if_f, l1_t, l1_f;
  logic                l1_ack, l2_ack, l3_ack, ex_ack;

  if_stage #(.MEM_DELAY(MEM_DELAY), .ROM_AW(ROM_AW)) u_if (
    .clk (clk), .rst (rst), .run (run), .l1_ack (l1_ack),
    .pc_rd (pc_rd), .pc_t (pc_rt), .pc_f (pc_rf),
    .rom_addr (rom_addr), .rom_rdata ({rom_w1, rom_w0}),
    .out_t (if_t), .out_f (if_f)
  );

  program_rom #(.WORDS(ROM_WORDS)) u_rom (
    .clk (clk), .addr (rom_addr), .word0 (rom_w0), .word1 (rom_w1),
    .ld_we (ld_we), .ld_addr (ld_addr), .ld_data (ld_data)
  );

  dr_latch #(.W(L1_W)) u_l1 (
    .clk (clk), .rst (rst), .in_t (if_t), .in_f (if_f), .ack_out (l1_ack),
    .out_t (l1_t), .out_f (l1_f), .ack_in (l2_ack)
  );

  // ---------------- ID ----------------
  logic                 id_rd;
  logic [1:0][7:0]      st_rt, st_rf;
  logic                 stall_rt, stall_rf;
  logic [SP_W+PC_W-1:0] stk_rt, stk_rf;
  logic [PC_W-1:0]      pcw_t, pcw_f;
  logic                 pcw_we_t, pcw_we_f, pcw_ack;
  logic                 stw_t, stw_f, stw_we_t, stw_we_f, stw_ack;
  logic [1:0]           stkop_t, stkop_f;
  logic [PC_W-1:0]      stkd_t, stkd_f;
  logic                 stk_ack;
  logic [ID_OF_W-1:0]   id_t, id_f, l2_t, l2_f;

  id_stage u_id (
    .clk (clk), .rst (rst), .in_t (l1_t), .in_f (l1_f),
    .rd (id_rd), .status_t (st_rt[1]), .status_f (st_rf[1]),
    .stall_t (stall_rt), .stall_f (stall_rf), .stk_t (stk_rt), .stk_f (stk_rf),
    .pcw_t (pcw_t), .pcw_f (pcw_f), .pcw_we_t (pcw_we_t), .pcw_we_f (pcw_we_f), .pcw_ack (pcw_ack),
    .stallw_t (stw_t), .stallw_f (stw_f), .stallw_we_t (stw_we_t), .stallw_we_f (stw_we_f),
    .stallw_ack (stw_ack),
    .stkop_t (stkop_t), .stkop_f (stkop_f), .stkd_t (stkd_t), .stkd_f (stkd_f), .stkw_ack (stk_ack),
    .out_t (id_t), .out_f (id_f)
  );

  dr_register #(.W(PC_W), .NR(1)) u_pc (
    .clk (clk), .rst (rst), .w_t (pcw_t), .w_f (pcw_f), .we_t (pcw_we_t), .we_f (pcw_we_f),
    .w_ack (pcw_ack), .rd (pc_rd), .r_t (pc_rt), .r_f (pc_rf), .q (dbg_pc)
  );

  dr_register #(.W(1), .NR(1)) u_stall (
    .clk (clk), .rst (rst), .w_t (stw_t), .w_f (stw_f), .we_t (stw_we_t), .we_f (stw_we_f),
    .w_ack (stw_ack), .rd (id_rd), .r_t (stall_rt), .r_f (stall_rf), .q (dbg_stall)
  );

  return_stack #(.DEPTH(STACK_DEPTH)) u_stack (
    .clk (clk), .rst (rst), .op_t (stkop_t), .op_f (stkop_f), .d_t (stkd_t), .d_f (stkd_f),
    .w_ack (stk_ack), .rd (id_rd), .r_t (stk_rt), .r_f (stk_rf), .stkptr (dbg_stkptr)
  );

  dr_latch #(.W(ID_OF_W)) u_l2 (
    .clk (clk), .rst (rst), .in_t (id_t), .in_f (id_f), .ack_out (l2_ack),
    .out_t (l2_t), .out_f (l2_f), .ack_in (l3_ack)
  );

  // ---------------- OF ----------------
  logic                of_rd;
  logic [39:0]         regs_t, regs_f;
  logic [DADDR_W-1:0]  ram_raddr;
  logic [7:0]          ram_rdata;
  logic [OF_EX_W-1:0]  of_t, of_f, l3_t, l3_f;

  of_stage #(.MEM_DELAY(MEM_DELAY)) u_of (
    .clk (clk), .rst (rst), .in_t (l2_t), .in_f (l2_f),
    .rd (of_rd), .regs_t (regs_t), .regs_f (regs_f),
    .mem_addr (ram_raddr), .mem_rdata (ram_rdata),
    .out_t (of_t), .out_f (of_f)
  );

  dr_latch #(.W(OF_EX_W)) u_l3 (
    .clk (clk), .rst (rst), .in_t (of_t), .in_f (of_f), .ack_out (l3_ack),
    .out_t (l3_t), .out_f (l3_f), .ack_in (ex_ack)
  );

  // ---------------- EX/WB ----------------
  logic [4:0]          rwe_t, rwe_f, rw_ack;
  logic [39:0]         rwd_t, rwd_f;
  logic                mwe_t, mwe_f, m_ack;
  logic [DADDR_W-1:0]  ma_t, ma_f;
  logic [7:0]          md_t, md_f;
  logic [DADDR_W-1:0]  ram_waddr;
  logic [7:0]          ram_wdata;
  logic                ram_we;
  logic [7:0]          q_wreg, q_status, q_bsr, q_prodl, q_prodh;

  exwb_stage u_ex (
    .clk (clk), .rst (rst), .in_t (l3_t), .in_f (l3_f), .ack (ex_ack),
    .we_t (rwe_t), .we_f (rwe_f), .wd_t (rwd_t), .wd_f (rwd_f), .w_ack (rw_ack),
    .mwe_t (mwe_t), .mwe_f (mwe_f), .ma_t (ma_t), .ma_f (ma_f), .md_t (md_t), .md_f (md_f),
    .m_ack (m_ack)
  );

  // register set written by EX/WB, read by OF (and STATUS by ID)
  dr_register #(.W(8), .NR(1)) u_wreg (
    .clk (clk), .rst (rst), .w_t (rwd_t[7:0]), .w_f (rwd_f[7:0]), .we_t (rwe_t[0]), .we_f (rwe_f[0]),
    .w_ack (rw_ack[0]), .rd (of_rd), .r_t (regs_t[7:0]), .r_f (regs_f[7:0]), .q (q_wreg)
  );
  dr_register #(.W(8), .NR(2)) u_status (
    .clk (clk), .rst (rst), .w_t (rwd_t[15:8]), .w_f (rwd_f[15:8]), .we_t (rwe_t[1]), .we_f (rwe_f[1]),
    .w_ack (rw_ack[1]), .rd ({id_rd, of_rd}), .r_t (st_rt), .r_f (st_rf), .q (q_status)
  );
  assign regs_t[15:8] = st_rt[0];
  assign regs_f[15:8] = st_rf[0];
  dr_register #(.W(8), .NR(1)) u_bsr (
    .clk (clk), .rst (rst), .w_t (rwd_t[23:16]), .w_f (rwd_f[23:16]), .we_t (rwe_t[2]), .we_f (rwe_f[2]),
    .w_ack (rw_ack[2]), .rd (of_rd), .r_t (regs_t[23:16]), .r_f (regs_f[23:16]), .q (q_bsr)
  );
  dr_register #(.W(8), .NR(1)) u_prodl (
    .clk (clk), .rst (rst), .w_t (rwd_t[31:24]), .w_f (rwd_f[31:24]), .we_t (rwe_t[3]), .we_f (rwe_f[3]),
    .w_ack (rw_ack[3]), .rd (of_rd), .r_t (regs_t[31:24]), .r_f (regs_f[31:24]), .q (q_prodl)
  );
  dr_register #(.W(8), .NR(1)) u_prodh (
    .clk (clk), .rst (rst), .w_t (rwd_t[39:32]), .w_f (rwd_f[39:32]), .we_t (rwe_t[4]), .we_f (rwe_f[4]),
    .w_ack (rw_ack[4]), .rd (of_rd), .r_t (regs_t[39:32]), .r_f (regs_f[39:32]), .q (q_prodh)
  );

  mem_write_if #(.AW(DADDR_W), .DW(8), .DELAY(MEM_DELAY)) u_ram_wif (
    .clk (clk), .rst (rst), .a_t (ma_t), .a_f (ma_f), .wd_t (md_t), .wd_f (md_f),
    .we_t (mwe_t), .we_f (mwe_f), .mem_addr (ram_waddr), .mem_wdata (ram_wdata),
    .mem_we (ram_we), .ack (m_ack)
  );

  data_ram #(.BYTES(RAM_BYTES)) u_ram (
    .clk (clk), .raddr (ram_raddr[$clog2(RAM_BYTES)-1:0]), .rdata (ram_rdata),
    .we (ram_we), .waddr (ram_waddr[$clog2(RAM_BYTES)-1:0]), .wdata (ram_wdata),
    .dbg_addr (dbg_addr[$clog2(RAM_BYTES)-1:0]), .dbg_data (dbg_data)
  );

  assign dbg_wreg   = q_wreg;
  assign dbg_status = q_status;
  assign dbg_bsr    = q_bsr;
  assign dbg_prod   = {q_prodh, q_prodl};
  assign retire     = ex_ack;
endmodule
