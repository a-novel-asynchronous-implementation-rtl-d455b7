// exwb_stage: execute and write-back stage of the asynchronous PIC18.
//
// Takes the operand bundle from the OF/EX latch, runs the ALU and
// multiplier (pic18_alu) and writes the results: WREG, STATUS, BSR, PRODL,
// PRODH through their dual-rail register write channels, and the data
// memory through the dual-rail memory write interface. Every pass sends one
// codeword to every write channel; channels the instruction does not write
// get we = 0 and are acknowledged without a change.
// Handshake: a dr_eval block computes all write codewords once the latch
// output is complete. A C-element joins the six write acknowledges into
// `ack`, the acknowledge of the OF/EX latch: it rises only when every write
// has been done and falls when every write channel has returned to null.
// A write to a mapped register through a file address (e.g. MOVWF to
// 0xFE0) goes to the real register. When an instruction both writes STATUS
// as a file register and changes flags, the flag bits win.
// Following the original design: the EX/WB stage computes and writes the
// result back. Own choices: the single write channel per register with a
// dual-rail write enable, the C-element join of the acknowledges, the PIC18
// flag rules.
module exwb_stage
  import pic18_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic [OF_EX_W-1:0]  in_t,
  input  logic [OF_EX_W-1:0]  in_f,
  output logic                ack,
  // register write channels, each {we, data}, order: PRODH, PRODL, BSR, STATUS, WREG
  output logic [4:0]          we_t,
  output logic [4:0]          we_f,
  output logic [39:0]         wd_t,      // {PRODH, PRODL, BSR, STATUS, WREG}
  output logic [39:0]         wd_f,
  input  logic [4:0]          w_ack,
  // data memory write channel {we, addr, data}
  output logic                mwe_t,
  output logic                mwe_f,
  output logic [DADDR_W-1:0]  ma_t,
  output logic [DADDR_W-1:0]  ma_f,
  output logic [7:0]          md_t,
  output logic [7:0]          md_f,
  input  logic                m_ack
);
  localparam int unsigned EW = 5 + 40 + 1 + DADDR_W + 8;

  of_ex_t      x;
  logic [7:0]  result, st_new;
  logic [15:0] prod;
  logic        flags_we;
  logic [EW-1:0] val, ev_t, ev_f;

  assign x = of_ex_t'(in_t);

  pic18_alu u_alu (
    .op (x.op), .s1 (x.s1), .s2 (x.s2), .status_in (x.status),
    .result (result), .prod (prod), .status_out (st_new), .flags_we (flags_we)
  );

  always_comb begin
    logic       fdst;
    logic [4:0] we;
    logic [7:0] w_wreg, w_status, w_bsr, w_prodl, w_prodh;
    logic       mwe;
    fdst = (x.dst == DST_F);
    we[0] = (x.dst == DST_W)    || (fdst && x.dreg == R_WREG);
    we[1] = flags_we            || (fdst && x.dreg == R_STATUS);
    we[2] = (x.dst == DST_BSR)  || (fdst && x.dreg == R_BSR);
    we[3] = (x.dst == DST_PROD) || (fdst && x.dreg == R_PRODL);
    we[4] = (x.dst == DST_PROD) || (fdst && x.dreg == R_PRODH);
    mwe   = fdst && x.dreg == R_MEM;

    w_wreg   = result;
    w_status = (fdst && x.dreg == R_STATUS)
             ? ((result & ~8'h1F) | (flags_we ? (st_new & 8'h1F) : (result & 8'h1F)))
             : st_new;
    w_bsr    = {4'h0, result[3:0]};
    w_prodl  = (x.dst == DST_PROD) ? prod[7:0]  : result;
    w_prodh  = (x.dst == DST_PROD) ? prod[15:8] : result;
    val = {we, w_prodh, w_prodl, w_bsr, w_status, w_wreg, mwe, x.daddr, result};
  end

  dr_eval #(.W(EW)) u_eval (
    .clk (clk), .rst (rst),
    .in_valid (&(in_t | in_f)), .in_null (~|(in_t | in_f)),
    .val (val), .out_t (ev_t), .out_f (ev_f)
  );

  assign {we_t, wd_t, mwe_t, ma_t, md_t} = ev_t;
  assign {we_f, wd_f, mwe_f, ma_f, md_f} = ev_f;

  c_element #(.N(6)) u_join (
    .clk (clk), .rst (rst), .in ({m_ack, w_ack}), .out (ack)
  );
endmodule
