// tb_dr_latch: a three-stage Muller pipeline of 8-bit dual-rail latches.
// A 4-phase source pushes random tokens, each followed by null, as fast as
// the first latch acknowledges; a 4-phase sink with a random response delay
// takes them. Checks: every token arrives, in order, unchanged; no output
// bit ever shows the illegal {1,1}; and the pipeline never holds data in two
// neighbouring latches (at most 50% occupancy).
// The expected values are computed in the testbench itself, independently of
// the design; stimulus and checks are this testbench's own.
`timescale 1ns/1ps
module tb_dr_latch;
  localparam int W = 8, N = 3, TOKENS = 200;
  logic clk = 0, rst = 1;
  logic [W-1:0] s_t = '0, s_f = '0;
  logic [N:0][W-1:0] d_t, d_f;
  logic [N:0] ack;          // ack[i] is the acknowledge into stage i-1
  logic sink_ack = 0;
  int unsigned checks = 0, failures = 0;
  logic [W-1:0] sent [$];

  assign d_t[0] = s_t;
  assign d_f[0] = s_f;
  assign ack[N] = sink_ack;
  for (genvar i = 0; i < N; i++) begin : g_l
    dr_latch #(.W(W)) u (.clk, .rst, .in_t(d_t[i]), .in_f(d_f[i]), .ack_out(ack[i]),
                         .out_t(d_t[i+1]), .out_f(d_f[i+1]), .ack_in(ack[i+1]));
  end
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // illegal codeword and occupancy monitor
  always @(posedge clk) if (!rst) begin
    for (int i = 1; i <= N; i++) if (|(d_t[i] & d_f[i])) begin failures++; $display("FAIL illegal codeword in latch %0d", i); end
    for (int i = 1; i < N; i++) if ((&(d_t[i] | d_f[i])) && (&(d_t[i+1] | d_f[i+1])) && (d_t[i] != d_t[i+1])) begin
      failures++; $display("FAIL two different tokens in neighbouring latches %0d", i);
    end
  end

  initial begin : source
    repeat (2) @(posedge clk);
    rst = 0;
    for (int k = 0; k < TOKENS; k++) begin
      logic [W-1:0] v;
      v = 8'($urandom);
      wait (ack[0] == 0);
      @(negedge clk); s_t = v; s_f = ~v; sent.push_back(v);
      wait (ack[0] == 1);
      @(negedge clk); s_t = '0; s_f = '0;
    end
  end

  initial begin : sink
    int unsigned got = 0;
    wait (rst == 0);
    while (got < TOKENS) begin
      wait (&(d_t[N] | d_f[N]));
      repeat ($urandom_range(0, 6)) @(posedge clk);
      checks++;
      if (sent.size() == 0 || d_t[N] != sent[0]) begin
        failures++; $display("FAIL token %0d: got %h", got, d_t[N]);
      end
      if (sent.size() != 0) void'(sent.pop_front());
      got++;
      @(negedge clk); sink_ack = 1;
      wait (~|(d_t[N] | d_f[N]));
      @(negedge clk); sink_ack = 0;
    end
    checks++;
    if (sent.size() != 0) begin failures++; $display("FAIL tokens left"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
