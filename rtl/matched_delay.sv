// matched_delay: matching delay line for bundled single-rail signalling.
//
// Delays both edges of `in` by DELAY `clk` periods (DELAY >= 1), standing in
// for the chain of delay elements that must be longer than the access time
// of the conventional memory behind the dual-rail interface.
// Following the original design: a delay longer than the memory read time.
// Own choice: a shift register of DELAY time-base periods.
module matched_delay #(
  parameter int unsigned DELAY = 4
) (
  input  logic clk,
  input  logic rst,
  input  logic in,
  output logic out
);
  logic [DELAY-1:0] sr;
  always_ff @(posedge clk) begin
    if (rst) sr <= '0;
    else begin
      sr[0] <= in;
      for (int i = 1; i < DELAY; i++) sr[i] <= sr[i-1];
    end
  end
  assign out = sr[DELAY-1];
endmodule
