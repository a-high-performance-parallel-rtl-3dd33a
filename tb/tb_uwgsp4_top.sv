// tb_uwgsp4_top: end-to-end run of the whole system at reduced sizes (four
// vector units, 4096-word memory modules, a 16 x 8 screen, refresh every 50
// cycles). The testbench plays the parts that are not built as logic: the
// processors' bus interfaces (it moves words between the high-speed buses
// and a vector unit's FIFOs), the FPUs (behavioural models) and the polygon
// pipelines (it sends spans).
//
// The run: two rows of 8-bit pixels are written to shared memory (one
// across a segment boundary), read back through two ports and streamed into
// vector unit 0, unpacked, subtracted on the alternating FPUs and packed;
// the result is written to memory through a third port and read back and
// checked. All vector units then meet at a barrier through the token ring.
// Eight ports write to one memory controller at once. Spans are drawn with
// the Z test into the back buffer, the buffers are swapped and a displayed
// frame is checked pixel by pixel. Each mechanism is counted and must occur:
// segment split, refresh, crossbar conflict, input FIFO full stall, FPU
// alternation, pixel conversion, token passing, Z-hidden pixel, distributor
// wait and buffer swap.
module tb_uwgsp4_top;
  timeunit 1ns; timeprecision 1ps;
  import uwgsp4_pkg::*;
  localparam int NB = 4, NP = 8, NV = 4, LAT = 4, NPIX = 64, NW = NPIX / 4;
  localparam int HA = 16, VA = 8, HB = 4, VB = 2;

  logic clk, clk_bus, rst = 1;
  always begin
    clk_bus = 1; clk = 1; #6.25; clk_bus = 0; #6.25;
    clk_bus = 1; clk = 0; #6.25; clk_bus = 0; #6.25;
  end

  up_word_t bus_up [NB];
  dn_word_t bus_dn [NB];
  logic     bus_slot [NB];
  vpu_in_t  vpu_in [NV], ctl [NV];
  vpu_out_t vpu_out [NV];
  logic [NV-1:0] sync_req, sync_grant;
  logic span_valid, span_ready, swap_req, swap_done, front, de, hsync, vsync;
  span_t span;
  logic [23:0] rgb;
  logic [15:0] mem_pieces [NP], mem_refreshes [NP], xbar_conflicts, frames, dist_waits;
  logic [31:0] pixels_written [4], pixels_hidden [4];

  uwgsp4_top #(.N_VPU(NV), .MOD_BITS(12), .H_ACTIVE(HA), .V_ACTIVE(VA), .H_BLANK(HB), .V_BLANK(VB),
               .REFRESH_PERIOD(50)) dut (.*);

  // two FPUs per vector unit
  for (genvar v = 0; v < NV; v++) begin : g_fpu
    logic [1:0] rv; logic [31:0] r0, r1;
    fpu_model #(.LAT(LAT)) f0 (.clk, .valid(vpu_out[v].fpu_valid[0]), .op(vpu_out[v].fpu_op),
      .a(vpu_out[v].fpu_a), .b(vpu_out[v].fpu_b), .rvalid(rv[0]), .r(r0));
    fpu_model #(.LAT(LAT)) f1 (.clk, .valid(vpu_out[v].fpu_valid[1]), .op(vpu_out[v].fpu_op),
      .a(vpu_out[v].fpu_a), .b(vpu_out[v].fpu_b), .rvalid(rv[1]), .r(r1));
    always_comb begin
      vpu_in[v] = ctl[v];
      vpu_in[v].fpu_rvalid = rv; vpu_in[v].fpu_r0 = r0; vpu_in[v].fpu_r1 = r1;
    end
  end

  int checks = 0, failures = 0;

  // ------------------------------------------------ mechanism counters
  int n_fifo_stall = 0, n_fpu0 = 0, n_fpu1 = 0, n_pfu = 0, n_grant = 0;
  always @(posedge clk) if (!rst) begin
    if (!vpu_out[0].mem_in_ready) n_fifo_stall++;
    if (vpu_out[0].fpu_valid[0]) n_fpu0++;
    if (vpu_out[0].fpu_valid[1]) n_fpu1++;
    if (vpu_out[0].p_done) n_pfu++;
    if (vpu_out[0].fpu_valid == 2'b11) begin failures++; $display("FAIL both FPUs issued at once"); end
  end

  // ------------------------------------------------ bus drivers
  logic [31:0] ref_mem [int];
  up_word_t    txq  [NP][$];
  logic [31:0] rxq  [NP][$];
  int          dones[NP];
  logic        rdy  [NP];
  for (genvar b = 0; b < NB; b++) begin : g_drv
    always @(negedge clk_bus) begin
      int p;
      p = 2*b + int'(bus_slot[b]);
      bus_up[b] <= '0;
      if (!rst && txq[p].size() > 0 && rdy[p]) bus_up[b] <= txq[p].pop_front();
      if (!rst) begin
        rdy[p] = bus_dn[b].ready;
        if (bus_dn[b].rvalid) rxq[p].push_back(bus_dn[b].data);
        if (bus_dn[b].done)   dones[p]++;
      end
    end
  end

  // a row access of n words at base through port p; writes take data from wq
  task automatic row(input int p, input logic we, input int n, input int unsigned base,
                     input logic [31:0] wq [$]);
    hdr_t h; up_word_t w; int d0;
    h = '0; h.mode = MODE_ROW; h.we = we; h.bmask = 4'hF; h.count_x = LEN_W'(n); h.count_y = 1;
    d0 = dones[p];
    w = '0; w.src = 2'(p % 2);
    w.kind = UP_HDR;    w.data = 32'(h); txq[p].push_back(w);
    w.kind = UP_ADDR;   w.data = base;   txq[p].push_back(w);
    w.kind = UP_STRIDE; w.data = 0;      txq[p].push_back(w);
    if (we) for (int i = 0; i < n; i++) begin
      w.kind = UP_WDATA; w.data = wq[i]; txq[p].push_back(w);
      ref_mem[base + i] = wq[i];
    end
    wait (dones[p] == d0 + 1);
  endtask

  typedef struct { logic we; int n; int unsigned base; } job_t;
  job_t jobs [NP][$];
  int finished;
  logic [31:0] none [$];
  for (genvar g = 0; g < NP; g++) begin : g_worker
    initial forever begin
      job_t j; logic [31:0] d [$];
      wait (jobs[g].size() > 0);
      j = jobs[g].pop_front();
      d = {};
      for (int i = 0; i < j.n; i++) d.push_back($urandom);
      row(g, j.we, j.n, j.base, d);
      finished++;
    end
  end

  // ------------------------------------------------ vector unit 0 helpers
  task automatic pfu(input logic [2:0] m, input int n, input logic db);
    @(negedge clk);
    ctl[0].p_start = 1; ctl[0].p_mode = m; ctl[0].p_count = 12'(n);
    ctl[0].p_src = 0; ctl[0].p_dst = 0; ctl[0].p_dst_b = db;
    @(negedge clk); ctl[0].p_start = 0;
  endtask

  // move the words read through port p into vector unit 0's input FIFO
  task automatic feed(input int p, input int n);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      ctl[0].mem_in_valid = 0;
      while (rxq[p].size() == 0 || !vpu_out[0].mem_in_ready) @(negedge clk);
      ctl[0].mem_in_valid = 1; ctl[0].mem_in_word = rxq[p].pop_front();
    end
    @(negedge clk); ctl[0].mem_in_valid = 0;
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] pw [$], qw [$], res [$];
  logic [23:0] ez [VA][HA], ec [VA][HA];
  int hidden = 0;

  task automatic send(input span_t s);
    @(negedge clk);
    span = s; span_valid = 1;
    @(posedge clk);
    while (!span_ready) @(posedge clk);
    #1 span_valid = 0;
    for (int j = 0; j < s.len; j++) begin
      logic [31:0] z; logic [15:0] r, g, b;
      z = s.z + 32'(j) * s.dz;
      r = s.r + 16'(j) * s.dr; g = s.g + 16'(j) * s.dg; b = s.b + 16'(j) * s.db;
      if (!s.ztest || z[31:8] < ez[s.y][s.x0 + j]) begin
        ez[s.y][s.x0 + j] = z[31:8]; ec[s.y][s.x0 + j] = {r[15:8], g[15:8], b[15:8]};
      end else hidden++;
    end
  endtask

  initial begin
    int pieces0, refr, nsw, hid;
    span_t s;
    for (int p = 0; p < NP; p++) begin dones[p] = 0; rdy[p] = 1; end
    for (int b = 0; b < NB; b++) bus_up[b] = '0;
    for (int v = 0; v < NV; v++) ctl[v] = '0;
    sync_req = 0; span_valid = 0; span = '0; swap_req = 0;
    repeat (4) @(posedge clk);
    #15 rst = 0;
    repeat (4) @(posedge clk);

    // 1. two pixel rows into shared memory; the second crosses a segment
    pieces0 = 0; for (int m = 0; m < NP; m++) pieces0 += int'(mem_pieces[m]);
    for (int k = 0; k < NW; k++) begin pw.push_back($urandom); qw.push_back($urandom); end
    row(0, 1, NW, 1000, pw);
    row(1, 1, NW, 1020, qw);
    begin
      int pc; pc = 0; for (int m = 0; m < NP; m++) pc += int'(mem_pieces[m]);
      checks++;
      if (pc - pieces0 != 3) begin failures++; $display("FAIL %0d pieces for two rows, one split", pc - pieces0); end
    end

    // 2. read them into vector unit 0: the FIFO fills before the PFU starts
    row(0, 0, NW, 1000, none);
    feed(0, NW);
    pfu(3'd0, NPIX, 1'b0); while (vpu_out[0].p_busy) @(negedge clk);
    row(1, 0, NW, 1020, none);
    pfu(3'd0, NPIX, 1'b1); feed(1, NW); while (vpu_out[0].p_busy) @(negedge clk);

    // 3. C = A - B on the alternating FPUs, pack to 8 bits
    @(negedge clk);
    ctl[0].v_start = 1; ctl[0].v_op = 4'd2; ctl[0].v_count_x = 12'(NPIX); ctl[0].v_count_y = 1;
    ctl[0].a_sx = 1; ctl[0].b_sx = 1; ctl[0].c_sx = 1;
    @(negedge clk); ctl[0].v_start = 0;
    while (!vpu_out[0].v_done) @(negedge clk);
    pfu(3'd3, NPIX, 1'b0);
    while (res.size() < NW) begin
      @(negedge clk);
      ctl[0].mem_out_pop = 0;
      if (vpu_out[0].mem_out_valid) begin res.push_back(vpu_out[0].mem_out_word); ctl[0].mem_out_pop = 1; end
    end
    @(negedge clk); ctl[0].mem_out_pop = 0;

    // 4. result to memory through port 2 and back through port 3
    row(2, 1, NW, 5000, res);
    row(3, 0, NW, 5000, none);
    for (int k = 0; k < NPIX; k++) begin
      logic [7:0] a, b, e, got;
      a = pw[k / 4][8 * (k % 4) +: 8]; b = qw[k / 4][8 * (k % 4) +: 8];
      e = (a > b) ? a - b : 8'd0;
      got = rxq[3][k / 4][8 * (k % 4) +: 8];
      checks++;
      if (got !== e) begin failures++; $display("FAIL result pixel %0d: %h exp %h", k, got, e); end
    end
    rxq[3] = {};

    // 5. barrier: every vector unit asks for the token, each gets it once
    @(negedge clk); sync_req = '1;
    for (int k = 0; k < 4 * NV && sync_req != 0; k++) begin
      @(negedge clk); n_grant += $countones(sync_grant); sync_req = sync_req & ~sync_grant;
    end
    checks++;
    if (sync_req != 0) begin failures++; $display("FAIL barrier not passed: %b", sync_req); end
    sync_req = 0;

    // 6. eight ports write into one controller at once
    finished = 0;
    for (int p = 0; p < NP; p++) jobs[p].push_back('{1'b1, 16, 32'(8192 + 16 * p)});
    wait (finished == NP);

    // 7. graphics: clear, draw overlapping spans, swap, check the frame
    for (int y = 0; y < VA; y++) begin
      s = '0; s.len = 11'(HA); s.y = 10'(y); s.z = 32'hFFFFFF00; s.b = 16'h4000; send(s);
    end
    for (int t = 0; t < 40; t++) begin
      s = '0;
      s.x0 = 11'($urandom_range(HA - 1)); s.len = 11'($urandom_range(HA - s.x0, 1));
      s.y = 10'($urandom_range(VA - 1)); s.ztest = 1;
      s.z = $urandom_range(32'h00FF_FFFF, 0) << 8; s.dz = 32'($signed(12'($urandom))) << 8;
      s.r = 16'($urandom); s.g = 16'($urandom); s.b = 16'($urandom); s.dr = 16'h0080; s.dg = 16'hFF80;
      send(s);
    end
    @(negedge clk); while (!(span_ready && dut.u_gfx.bbi_idle == 4'hF)) @(negedge clk);
    @(negedge clk); swap_req = 1; @(negedge clk); swap_req = 0;
    nsw = 0;
    @(posedge clk); while (!swap_done) @(posedge clk);
    nsw++;
    for (int y = 0; y < VA; y++)
      for (int x = 0; x < HA; x++) begin
        @(posedge clk); while (!de) @(posedge clk);
        checks++;
        if (rgb !== ec[y][x]) begin failures++; $display("FAIL pixel %0d,%0d: %h exp %h", x, y, rgb, ec[y][x]); end
      end

    // mechanism counts
    refr = 0; for (int m = 0; m < NP; m++) refr += int'(mem_refreshes[m]);
    hid = 0; for (int i = 0; i < 4; i++) hid += int'(pixels_hidden[i]);
    $display("segment split 1, refreshes %0d, crossbar conflicts %0d, FIFO-full cycles %0d",
             refr, xbar_conflicts, n_fifo_stall);
    $display("FPU0 ops %0d, FPU1 ops %0d, PFU commands %0d, token grants %0d",
             n_fpu0, n_fpu1, n_pfu, n_grant);
    $display("hidden pixels %0d (expected %0d), distributor waits %0d, swaps %0d", hid, hidden, dist_waits, nsw);
    checks += 10;
    if (refr == 0)            begin failures++; $display("FAIL no refresh"); end
    if (xbar_conflicts == 0)  begin failures++; $display("FAIL no crossbar conflict"); end
    if (n_fifo_stall == 0)    begin failures++; $display("FAIL input FIFO never full"); end
    if (n_fpu0 != NPIX / 2 || n_fpu1 != NPIX / 2) begin failures++; $display("FAIL FPU shares"); end
    if (n_pfu != 3)           begin failures++; $display("FAIL %0d PFU commands", n_pfu); end
    if (n_grant != NV)        begin failures++; $display("FAIL %0d token grants", n_grant); end
    if (hid != hidden)        begin failures++; $display("FAIL hidden pixel count"); end
    if (hidden == 0)          begin failures++; $display("FAIL no pixel hidden"); end
    if (dist_waits == 0)      begin failures++; $display("FAIL distributor never waited"); end
    if (nsw != 1 || front !== 1'b1) begin failures++; $display("FAIL buffer swap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
