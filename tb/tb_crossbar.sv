// tb_crossbar: ports request random memory controllers and hold the path
// for random times. Checks that no column is granted to two ports, that a
// granted port's word reaches exactly its chosen controller and the
// controller's answer comes back to it, that every request is granted
// within a bounded wait (round robin), and that conflicts are counted.
module tb_crossbar;
  timeunit 1ns; timeprecision 1ps;
  import uwgsp4_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst = 1;
  always #12.5 clk = ~clk;
  logic [N-1:0] req, grant;
  logic [2:0] dest [N];
  xreq_t p_in [N], m_out [N];
  xrsp_t p_out [N], m_in [N];
  logic [15:0] conflicts;
  crossbar #(.N(N)) dut (.*);

  int checks = 0, failures = 0, grants = 0;
  int hold [N], wait_c [N];

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // each port drives its number; each controller answers with its number
  always_comb for (int p = 0; p < N; p++) begin
    p_in[p] = '0; p_in[p].kind = XK_WDATA; p_in[p].data = 32'(p);
    m_in[p] = '0; m_in[p].rvalid = 1'b1; m_in[p].data = 32'(100 + p);
  end

  initial begin
    for (int p = 0; p < N; p++) begin req[p] = 0; dest[p] = 0; hold[p] = 0; wait_c[p] = 0; end
    repeat (2) @(negedge clk); rst = 0;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      // checks on the current cycle
      for (int m = 0; m < N; m++) begin
        int owners; owners = 0;
        for (int p = 0; p < N; p++) if (grant[p] && dest[p] == 3'(m)) owners++;
        checks++;
        if (owners > 1) begin failures++; $display("FAIL column %0d has %0d owners", m, owners); end
        if (owners == 1) begin
          checks++;
          if (m_out[m].kind != XK_WDATA || grant[m_out[m].data] != 1'b1 || dest[m_out[m].data] != 3'(m)) begin
            failures++; $display("FAIL column %0d sees port %0d", m, m_out[m].data);
          end
        end else begin
          checks++;
          if (m_out[m].kind != XK_IDLE) begin failures++; $display("FAIL idle column %0d driven", m); end
        end
      end
      for (int p = 0; p < N; p++) begin
        if (grant[p]) begin
          checks++;
          if (!p_out[p].rvalid || p_out[p].data != 32'(100 + dest[p])) begin failures++; $display("FAIL port %0d answer %0d", p, p_out[p].data); end
        end
        // drive the next cycle
        if (req[p] && grant[p]) begin
          if (hold[p] == 0) req[p] = 0; else hold[p]--;
        end else if (req[p]) begin
          wait_c[p]++;
          checks++;
          if (wait_c[p] > 8 * 12) begin failures++; $display("FAIL port %0d starved", p); wait_c[p] = 0; end
        end else if ($urandom_range(3) == 0) begin
          req[p] = 1; dest[p] = 3'($urandom_range(2)); hold[p] = $urandom_range(9); wait_c[p] = 0; grants++;
        end
      end
    end
    checks++;
    if (conflicts == 0) begin failures++; $display("FAIL no conflict counted"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
