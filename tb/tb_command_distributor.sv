// tb_command_distributor: four consumers accept spans with random delays.
// Every consumer must receive every span exactly once and in order, the
// distributor may take a new span only after all four have taken the last
// one, and the wait counter must equal the cycles in which some consumer
// still held a span back.
module tb_command_distributor;
  timeunit 1ns; timeprecision 1ps;
  import uwgsp4_pkg::*;
  logic clk = 0;
  always #12.5 clk = ~clk;
  logic rst, in_valid, in_ready;
  span_t in_span, out_span;
  logic [3:0] out_valid, out_ready;
  logic [15:0] waits;
  command_distributor #(.N(4)) dut (.*);

  int checks = 0, failures = 0;
  span_t sent [$];
  int got [4];
  int exp_waits = 0;
  localparam int NSPAN = 400;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // consumers: sample at the rising edge, change ready at the falling edge
  always @(posedge clk) if (!rst) begin
    if (in_ready) begin
      checks++;
      for (int i = 0; i < 4; i++)
        if (got[i] != sent.size()) begin failures++; $display("FAIL in_ready while consumer %0d behind", i); end
    end
    if (in_valid && in_ready) sent.push_back(in_span);
    for (int i = 0; i < 4; i++)
      if (out_valid[i] && out_ready[i]) begin
        checks++;
        if (got[i] >= sent.size() || out_span !== sent[got[i]]) begin
          failures++; $display("FAIL consumer %0d span %0d", i, got[i]);
        end
        got[i]++;
      end
    if ((out_valid & ~out_ready) != 0) exp_waits++;
  end
  always @(negedge clk) out_ready = 4'($urandom);

  initial begin
    rst = 1; in_valid = 0; in_span = '0;
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int t = 0; t < NSPAN; t++) begin
      @(negedge clk);
      in_valid = 1; in_span = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      #1;
      if ($urandom_range(3) == 0) begin in_valid = 0; repeat ($urandom_range(3)) @(negedge clk); end
    end
    @(negedge clk); in_valid = 0;
    repeat (40) @(negedge clk);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (got[i] != NSPAN) begin failures++; $display("FAIL consumer %0d got %0d spans", i, got[i]); end
    end
    checks++;
    if (waits != 16'(exp_waits)) begin failures++; $display("FAIL waits %0d exp %0d", waits, exp_waits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
