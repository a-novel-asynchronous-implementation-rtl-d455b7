// sr_to_dr: single-rail to dual-rail converter for the memory interface.
//
// While `en` is high each bit of the single-rail value d is driven onto its
// true rail (if 1) or its false rail (if 0); while `en` is low both rails are
// held at zero, the null codeword. `en` is the delayed strobe of the memory
// interface, so the codeword appears only after the memory data is stable.
// Purely combinational.
// Following the original design: the single-rail to dual-rail converter
// enabled by the delayed strobe. Own choice: none beyond the width parameter.
module sr_to_dr #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] d,
  input  logic         en,
  output logic [W-1:0] q_t,
  output logic [W-1:0] q_f
);
  assign q_t =  d & {W{en}};
  assign q_f = ~d & {W{en}};
endmodule
