// tb_sync_fifo: random pushes and pops against a queue model; checks the
// output word, the count, and the full and empty flags.
module tb_sync_fifo;
  timeunit 1ns; timeprecision 1ps;
  localparam int W = 32, D = 16;
  logic clk = 0, rst = 1;
  always #12.5 clk = ~clk;
  logic push, pop, empty, full;
  logic [W-1:0] din, dout;
  logic [$clog2(D+1)-1:0] count;
  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] q [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; din = 0;
    repeat (2) @(negedge clk); rst = 0;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      checks++;
      if (count != q.size() || empty != (q.size() == 0) || full != (q.size() == D)) begin
        failures++; $display("FAIL count %0d model %0d", count, q.size());
      end
      if (q.size() > 0) begin
        checks++;
        if (dout !== q[0]) begin failures++; $display("FAIL dout %h exp %h", dout, q[0]); end
      end
      // bias towards filling in the first half and draining in the second
      push = ($urandom_range(99) < ((t % 1000) < 500 ? 70 : 30)) && !full;
      pop  = ($urandom_range(99) < ((t % 1000) < 500 ? 30 : 70)) && !empty;
      din  = $urandom;
      @(posedge clk); #1;
      if (pop)  void'(q.pop_front());
      if (push) q.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
