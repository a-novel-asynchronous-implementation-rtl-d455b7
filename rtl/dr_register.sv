// dr_register: W-bit dual-rail register with a write handshake and read ports.
//
// Write side: the writer drives a dual-rail codeword {we, d}. When the
// codeword is complete and we is true the value of d is stored; when we is
// false the stored value is left alone. Either way the register then raises
// w_ack, which falls again once the writer has returned the codeword to
// null (4-phase handshake). This lets a stage send one write codeword on
// every pass and signal "no write" with we = 0.
// Read side: NR read ports. While rd[i] is high port i shows the stored
// value as a dual-rail codeword; while rd[i] is low it shows null.
// The storage is the cross-coupled NOR pair of each bit, modelled here as a
// flip-flop per bit that is updated on the `clk` edge (one gate delay) at
// which the write codeword is seen complete; w_ack rises on that same edge.
// Following the original design: a dual-rail register cell holding the
// written codeword, acknowledging the write, read by a read strobe. Own
// choices: the dual-rail write-enable bit in the write codeword and several
// read ports.
module dr_register #(
  parameter int unsigned W          = 8,
  parameter int unsigned NR         = 1,
  parameter logic [W-1:0] RESET_VAL = '0
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [W-1:0]          w_t,
  input  logic [W-1:0]          w_f,
  input  logic                  we_t,
  input  logic                  we_f,
  output logic                  w_ack,
  input  logic [NR-1:0]         rd,
  output logic [NR-1:0][W-1:0]  r_t,
  output logic [NR-1:0][W-1:0]  r_f,
  output logic [W-1:0]          q      // stored value, single rail (observation)
);
  logic complete;
  assign complete = (&(w_t | w_f)) & (we_t | we_f);

  always_ff @(posedge clk) begin
    if (rst) q <= RESET_VAL;
    else if (complete && we_t) q <= w_t;
  end

  completion_detector #(.W(W + 1)) u_cd (
    .clk (clk), .rst (rst), .d_t ({we_t, w_t}), .d_f ({we_f, w_f}), .done (w_ack)
  );

  for (genvar i = 0; i < NR; i++) begin : g_rd
    assign r_t[i] = q & {W{rd[i]}};
    assign r_f[i] = ~q & {W{rd[i]}};
  end
endmodule
