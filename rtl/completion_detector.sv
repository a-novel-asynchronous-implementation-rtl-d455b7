// completion_detector: completion detection for a W-bit dual-rail codeword.
//
// One OR gate per bit tells whether that bit holds data ({t,f} = {1,0} or
// {0,1}); a W-input C-element joins the per-bit results. `done` therefore
// rises once every bit is valid and falls only once every bit has returned
// to null, which is the acknowledge a 4-phase dual-rail stage sends back.
// Latency: one `clk` (one C-element delay) after the last bit changes.
// Following the original design: one OR per dual-rail bit joined by a
// C-element. Own choice: none beyond the width parameter.
module completion_detector #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d_t,
  input  logic [W-1:0] d_f,
  output logic         done
);
  logic [W-1:0] bit_valid;
  assign bit_valid = d_t | d_f;

  c_element #(.N(W)) u_join (
    .clk (clk),
    .rst (rst),
    .in  (bit_valid),
    .out (done)
  );
endmodule
