// tb_dr_eval: checks the dual-rail output hold element used by the stages.
// Random cycles drive in_valid, in_null and val. After each cycle the output
// is compared with a reference kept in the testbench: null after reset; the
// codeword of val one clk after in_valid while null; unchanged while held,
// even if val changes; null one clk after in_null while held. The output must
// never show both rails of a bit high. Width 12.
// The expected values are computed in the testbench itself, independently of
// the design; stimulus and checks are this testbench's own.
`timescale 1ns/1ps
module tb_dr_eval;
  localparam int unsigned W = 12;

  logic         clk = 1'b0;
  logic         rst = 1'b1;
  logic         in_valid = 1'b0, in_null = 1'b1;
  logic [W-1:0] val = '0;
  logic [W-1:0] out_t, out_f;

  dr_eval #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic         m_held;
  logic [W-1:0] m_val;

  initial begin
    m_held = 1'b0;
    m_val  = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      // inputs change away from the clock edge
      in_valid = ($urandom_range(0, 2) == 0);
      in_null  = !in_valid && ($urandom_range(0, 2) == 0);
      val      = W'($urandom);
      @(posedge clk);
      // reference: the element's next state from the inputs seen at the edge
      if (m_held && in_null) m_held = 1'b0;
      else if (!m_held && in_valid) begin m_held = 1'b1; m_val = val; end
      #1;
      checks++;
      if (m_held ? (out_t !== m_val || out_f !== ~m_val) : (out_t !== '0 || out_f !== '0)) begin
        failures++;
        if (failures < 5)
          $display("FAIL cycle %0d: out_t=%h out_f=%h expected held=%0b val=%h",
                   i, out_t, out_f, m_held, m_val);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
