// dr_latch: W-bit 4-phase dual-rail pipeline latch (Muller pipeline stage).
//
// Every rail passes through a C-element whose second input is the inverted
// acknowledge from the next stage (ack_in). While ack_in is low, valid data
// on the input is captured; once every bit is valid the completion detector
// raises ack_out towards the previous stage. The output holds until the next
// stage acknowledges (ack_in high) and the input has returned to null; only
// then does it go null and ack_out fall. A chain of these latches holds at
// most one data token in every other latch (50% occupancy).
// rst clears every C-element, putting the latch into the null state.
// Following the original design: the Muller pipeline latch with completion
// detection and reset. Own choice: the C-elements are flip-flops on the
// unit-delay time base.
module dr_latch #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] in_t,
  input  logic [W-1:0] in_f,
  output logic         ack_out,   // to previous stage
  output logic [W-1:0] out_t,
  output logic [W-1:0] out_f,
  input  logic         ack_in     // from next stage
);
  for (genvar i = 0; i < W; i++) begin : g_bit
    c_element #(.N(2)) u_ct (.clk(clk), .rst(rst), .in({in_t[i], ~ack_in}), .out(out_t[i]));
    c_element #(.N(2)) u_cf (.clk(clk), .rst(rst), .in({in_f[i], ~ack_in}), .out(out_f[i]));
  end

  completion_detector #(.W(W)) u_cd (
    .clk (clk), .rst (rst), .d_t (out_t), .d_f (out_f), .done (ack_out)
  );

  // Protocol rule: a dual-rail bit never carries both rails at once.
  always_ff @(posedge clk)
    if (!rst) assert (!(|(out_t & out_f))) else $error("dr_latch: a bit holds both rails");
endmodule
