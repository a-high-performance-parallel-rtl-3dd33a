// tb_port_controller: one port controller against a simple crossbar and
// memory-controller model that records every row-vector command it gets.
// For scalar, row, column and 2-D commands (reads and writes) it checks the
// list of (controller, address, length) pieces against an independent
// computation of the split at segment boundaries, the write words the
// memory side receives, the read words forwarded downstream with the
// requester's tag, and the completion signal.
module tb_port_controller;
  timeunit 1ns; timeprecision 1ps;
  import uwgsp4_pkg::*;
  localparam int SEG = 9;
  logic clk = 0, rst = 1;
  always #12.5 clk = ~clk;
  up_word_t up; dn_word_t dn;
  logic x_req, x_grant; logic [2:0] x_dest; xreq_t x_out; xrsp_t x_in;
  logic [15:0] pieces;
  port_controller #(.SEG_BITS(SEG)) dut (.*);

  int checks = 0, failures = 0;
  // memory-side model
  typedef struct { int mc; int addr; int len; bit we; } piece_t;
  piece_t got_p [$];
  logic [31:0] wwords [$], rwords [$];
  int m_state = 0, m_left = 0, m_addr = 0; bit m_we;
  int gdelay = 0;

  always @(posedge clk) begin
    if (!x_req) begin x_grant <= 0; gdelay = 0; end
    else if (!x_grant) begin gdelay++; if (gdelay == 2) x_grant <= 1; end
  end

  always @(negedge clk) begin
    x_in = '0;
    if (x_grant) begin
      case (m_state)
        0: x_in.ready = 1;
        1: x_in.ready = 1;
        2: begin
          if (m_we) x_in.ready = (m_left > 0) && ($urandom_range(3) != 0);
          else if (m_left > 0) begin x_in.rvalid = 1; x_in.data = 32'(m_addr * 7 + 1); end
          x_in.done = (m_left == 1 && !m_we) || (m_left == 0 && m_we);
        end
      endcase
    end
  end

  always @(posedge clk) if (x_grant) begin
    case (m_state)
      0: if (x_out.kind == XK_ADDR) begin m_addr = x_out.data; m_we = x_out.we; m_state = 1; end
      1: if (x_out.kind == XK_LEN) begin
           piece_t p; p.mc = x_dest; p.addr = m_addr; p.len = x_out.data; p.we = m_we;
           got_p.push_back(p); m_left = x_out.data; m_state = 2;
         end
      2: begin
        if (m_we && x_in.ready && x_out.kind == XK_WDATA) begin wwords.push_back(x_out.data); m_left--; end
        else if (!m_we && x_in.rvalid) begin m_left--; m_addr++; end
        if (x_in.done) m_state = 0;
      end
    endcase
  end

  always @(posedge clk) if (dn.rvalid) begin
    rwords.push_back(dn.data);
    checks++;
    if (dn.src != 2'd1) begin failures++; $display("FAIL read tag %0d", dn.src); end
  end
  int dones = 0;
  always @(posedge clk) if (dn.done) dones++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(input up_kind_e k, input logic [31:0] d);
    @(negedge clk);
    while (!dn.ready) @(negedge clk);
    up = '0; up.kind = k; up.src = 2'd1; up.data = d;
    @(negedge clk); up = '0;
  endtask

  task automatic command(input acc_mode_e mode, input logic we, input int nx, input int ny, input int base, input int stride);
    hdr_t h; piece_t exp_p [$]; int rows, cols, d0; logic [31:0] sent [$];
    h = '0; h.mode = mode; h.we = we; h.bmask = 4'hF; h.count_x = LEN_W'(nx); h.count_y = LEN_W'(ny);
    rows = (mode == MODE_SCALAR || mode == MODE_ROW) ? 1 : ny;
    cols = (mode == MODE_SCALAR || mode == MODE_COLUMN) ? 1 : nx;
    // expected pieces: each row cut at multiples of 2^SEG
    for (int r = 0; r < rows; r++) begin
      int a, left; a = base + r * stride; left = cols;
      while (left > 0) begin
        piece_t p; int room;
        room = (1 << SEG) - (a % (1 << SEG));
        p.addr = a; p.len = left < room ? left : room; p.mc = (a >> SEG) % 8; p.we = we;
        exp_p.push_back(p); a += p.len; left -= p.len;
      end
    end
    got_p = {}; wwords = {}; rwords = {}; d0 = dones;
    put(UP_HDR, 32'(h)); put(UP_ADDR, 32'(base)); put(UP_STRIDE, 32'(stride));
    if (we) for (int i = 0; i < rows * cols; i++) begin
      logic [31:0] v; v = $urandom; sent.push_back(v); put(UP_WDATA, v);
    end
    wait (dones == d0 + 1);
    repeat (2) @(negedge clk);
    checks++;
    if (got_p.size() != exp_p.size()) begin failures++; $display("FAIL mode %0d: %0d pieces, %0d expected", mode, got_p.size(), exp_p.size()); end
    for (int i = 0; i < got_p.size() && i < exp_p.size(); i++) begin
      checks++;
      if (got_p[i].addr != exp_p[i].addr || got_p[i].len != exp_p[i].len || got_p[i].mc != exp_p[i].mc || got_p[i].we != we) begin
        failures++; $display("FAIL piece %0d: mc %0d addr %0d len %0d, exp mc %0d addr %0d len %0d", i,
          got_p[i].mc, got_p[i].addr, got_p[i].len, exp_p[i].mc, exp_p[i].addr, exp_p[i].len);
      end
    end
    if (we) begin
      checks++;
      if (wwords != sent) begin failures++; $display("FAIL write words differ (%0d of %0d)", wwords.size(), sent.size()); end
    end else begin
      int k; k = 0;
      checks++;
      if (rwords.size() != rows * cols) begin failures++; $display("FAIL %0d read words", rwords.size()); end
      foreach (exp_p[i]) for (int j = 0; j < exp_p[i].len; j++) begin
        checks++;
        if (k < rwords.size() && rwords[k] != 32'((exp_p[i].addr + j) * 7 + 1)) begin failures++; $display("FAIL read word %0d", k); end
        k++;
      end
    end
  endtask

  initial begin
    up = '0; x_grant = 0;
    repeat (2) @(negedge clk); rst = 0;
    command(MODE_SCALAR, 0, 0, 0, 1234, 0);
    command(MODE_ROW, 0, 100, 0, 480, 0);           // crosses one boundary
    command(MODE_ROW, 1, 40, 0, 1020, 0);
    command(MODE_COLUMN, 0, 0, 6, 77, 512);          // a different controller per element
    command(MODE_ARRAY, 1, 20, 3, 500, 1000);
    command(MODE_ARRAY, 0, 600, 2, 100, 4096);       // rows longer than a segment
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
