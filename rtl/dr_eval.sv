// dr_eval: output stage of a dual-rail function block (DIMS-style hold).
//
// A stage computes its result `val` combinationally from the true rails of
// its inputs. dr_eval turns that into a 4-phase dual-rail codeword with the
// return-to-zero discipline of the C-element based dual-rail gates: the
// output becomes the codeword of `val` only once all inputs are valid
// (in_valid), then holds, whatever the inputs do, until all inputs have
// returned to null (in_null), and only then returns to null. A change of an
// input from one valid value to another while the output holds is ignored.
// Latency: one `clk` (one C-element delay) in each direction.
// Own choice (helper): the original design builds stage logic from dual-rail
// gates; this block gives the same valid-when-all-valid, null-when-all-null
// behaviour for word-level logic written in single-rail form.
module dr_eval #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  logic         in_null,
  input  logic [W-1:0] val,
  output logic [W-1:0] out_t,
  output logic [W-1:0] out_f
);
  logic held;
  assign held = |(out_t | out_f);

  always_ff @(posedge clk) begin
    if (rst || (in_null && held)) begin
      out_t <= '0;
      out_f <= '0;
    end else if (in_valid && !held) begin
      out_t <= val;
      out_f <= ~val;
    end
  end
endmodule
