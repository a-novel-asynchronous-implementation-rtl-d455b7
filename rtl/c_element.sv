// c_element: N-input Muller C-element with reset.
//
// The output rises when every input is high, falls when every input is low,
// and otherwise keeps its value, so it is the state-holding element of the
// whole dual-rail design (pipeline latches, dual-rail gates, completion
// detection). A high rst forces the output low, as in the resettable
// C-element used for the pipeline latches.
//
// Timing: the element is modelled at unit delay. The keeper is a flip-flop
// clocked by `clk`, which here stands for one gate delay and carries no
// handshake meaning: the output follows a change of the inputs one `clk`
// edge later. This keeps every feedback loop of the asynchronous circuit
// broken by a register, so the design simulates and synthesises as ordinary
// RTL. The transistor-level keeper itself is not modelled.
// Following the original design: the C-element rule and a reset line on
// C-elements. Own choice: modelling the state-holding gate as a flip-flop on
// the unit-delay time base, and giving every C-element the reset.
module c_element #(
  parameter int unsigned N = 2
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] in,
  output logic         out
);
  always_ff @(posedge clk) begin
    if (rst)          out <= 1'b0;
    else if (&in)     out <= 1'b1;
    else if (~|in)    out <= 1'b0;
  end
endmodule
