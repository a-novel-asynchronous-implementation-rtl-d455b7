// dr_to_sr: dual-rail to single-rail converter for the memory interface.
//
// The single-rail value is taken from the true rails. A completion detector
// over the codeword produces `strobe`, which rises once every bit is valid
// (the single-rail value is then stable) and falls once the codeword has
// returned to null. Latency: one C-element delay from the last bit.
// Following the original design: the dual-rail to single-rail converter and
// its completion strobe. Own choice: the single-rail value is the true rail.
module dr_to_sr #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d_t,
  input  logic [W-1:0] d_f,
  output logic [W-1:0] d,
  output logic         strobe
);
  assign d = d_t;
  completion_detector #(.W(W)) u_cd (
    .clk (clk), .rst (rst), .d_t (d_t), .d_f (d_f), .done (strobe)
  );
endmodule
