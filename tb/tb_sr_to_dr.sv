// tb_sr_to_dr: random single-rail values with the enable on and off; the
// output must be the dual-rail codeword of the value when enabled and null
// when not.
// The expected values are computed in the testbench itself, independently of
// the design; stimulus and checks are this testbench's own.
`timescale 1ns/1ps
module tb_sr_to_dr;
  logic [7:0] d, q_t, q_f;
  logic en;
  int unsigned checks = 0, failures = 0;

  sr_to_dr #(.W(8)) dut (.d, .en, .q_t, .q_f);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      d = 8'($urandom); en = 1'($urandom_range(0, 1));
      #1;
      checks++;
      if (en ? (q_t != d || q_f != ~d) : (q_t != 0 || q_f != 0)) begin
        failures++; $display("FAIL d=%h en=%b t=%h f=%h", d, en, q_t, q_f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
