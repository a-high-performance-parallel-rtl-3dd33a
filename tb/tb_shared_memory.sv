// tb_shared_memory: self-checking test of the shared memory system through
// its four high-speed buses. A bus driver per port controller places words
// in that controller's 80 MHz slot and honours its ready bit; a reference
// memory (associative array with byte masks) predicts every read. Covers
// all four access modes, segment splitting, byte masks, refresh stalls,
// crossbar conflicts and the aggregate bandwidth of eight parallel row reads.
module tb_shared_memory;
  timeunit 1ns; timeprecision 1ps;
  import uwgsp4_pkg::*;
  localparam int unsigned NB = 4, NP = 8, MOD_BITS = 12, SEG_BITS = 9;

  logic clk, clk_bus, rst = 1;
  // clk rises with every second rising edge of clk_bus
  always begin
    clk_bus = 1; clk = 1; #6.25; clk_bus = 0; #6.25;
    clk_bus = 1; clk = 0; #6.25; clk_bus = 0; #6.25;
  end

  up_word_t    bus_up   [NB];
  dn_word_t    bus_dn   [NB];
  logic        bus_slot [NB];
  logic [15:0] pieces [NP], refreshes [NP], conflicts;

  shared_memory #(.MOD_BITS(MOD_BITS), .SEG_BITS(SEG_BITS), .REFRESH_PERIOD(50)) dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] ref_mem [int];
  up_word_t    txq  [NP][$];
  logic [31:0] rxq  [NP][$];
  int          dones[NP];
  logic        rdy  [NP];
  longint      cyc = 0;
  int          finished;

  always @(posedge clk) cyc <= cyc + 1;

  // bus drivers and monitors, one per bus
  for (genvar b = 0; b < NB; b++) begin : g_drv
    always @(negedge clk_bus) begin
      int p;
      // upstream: the next edge captures the slot of controller bus_slot
      p = 2*b + int'(bus_slot[b]);
      bus_up[b] <= '0;
      if (!rst && txq[p].size() > 0 && rdy[p]) bus_up[b] <= txq[p].pop_front();
      // downstream: the word on the bus now belongs to controller bus_slot
      if (!rst) begin
        rdy[p] = bus_dn[b].ready;
        if (bus_dn[b].rvalid) rxq[p].push_back(bus_dn[b].data);
        if (bus_dn[b].done)   dones[p]++;
      end
    end
  end

  function automatic int unsigned addr_of(input hdr_t h, input int unsigned base,
                                          input int unsigned stride, input int i);
    case (h.mode)
      MODE_SCALAR: return base;
      MODE_ROW:    return base + i;
      MODE_COLUMN: return base + i*stride;
      default:     return base + (i / h.count_x)*stride + (i % h.count_x);
    endcase
  endfunction

  function automatic int nwords(input hdr_t h);
    case (h.mode)
      MODE_SCALAR: return 1;
      MODE_ROW:    return int'(h.count_x);
      MODE_COLUMN: return int'(h.count_y);
      default:     return int'(h.count_x) * int'(h.count_y);
    endcase
  endfunction

  task automatic issue(input int p, input acc_mode_e mode, input logic we, input logic [3:0] bm,
                       input int nx, input int ny, input int unsigned base, input int unsigned stride);
    hdr_t h; up_word_t w; int n, d0;
    h = '0; h.mode = mode; h.we = we; h.bmask = bm; h.count_x = LEN_W'(nx); h.count_y = LEN_W'(ny);
    n = nwords(h);
    d0 = dones[p];
    w = '0; w.src = 2'(p % 2);
    w.kind = UP_HDR;    w.data = 32'(h);      txq[p].push_back(w);
    w.kind = UP_ADDR;   w.data = base;        txq[p].push_back(w);
    w.kind = UP_STRIDE; w.data = stride;      txq[p].push_back(w);
    if (we) for (int i = 0; i < n; i++) begin
      logic [31:0] v; int unsigned a;
      v = $urandom; a = addr_of(h, base, stride, i);
      w.kind = UP_WDATA; w.data = v; txq[p].push_back(w);
      if (!ref_mem.exists(a)) ref_mem[a] = 32'h0;
      for (int k = 0; k < 4; k++) if (bm[k]) ref_mem[a][8*k +: 8] = v[8*k +: 8];
    end
    wait (dones[p] == d0 + 1);
    if (!we) begin
      checks++;
      if (rxq[p].size() != n) begin
        failures++; $display("FAIL port %0d: %0d words read, %0d expected", p, rxq[p].size(), n);
      end
      for (int i = 0; i < n && rxq[p].size() > 0; i++) begin
        logic [31:0] got, exp; int unsigned a;
        a = addr_of(h, base, stride, i);
        got = rxq[p].pop_front();
        exp = ref_mem.exists(a) ? ref_mem[a] : 32'h0;
        checks++;
        if (got !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL port %0d word %0d addr %0d: got %h exp %h", p, i, a, got, exp);
        end
      end
    end
  endtask

  // a worker per port runs the row accesses queued for it, so that the
  // eight ports can be kept busy at the same time
  typedef struct { logic we; int n; int unsigned base; } job_t;
  job_t jobs [NP][$];

  for (genvar g = 0; g < NP; g++) begin : g_worker
    initial forever begin
      job_t j;
      wait (jobs[g].size() > 0);
      j = jobs[g].pop_front();
      issue(g, MODE_ROW, j.we, 4'hF, j.n, 1, j.base, 0);
      finished++;
    end
  end

  task automatic launch(input int p, input logic we, input int n, input int unsigned base);
    job_t j;
    j.we = we; j.n = n; j.base = base;
    jobs[p].push_back(j);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0; int npc0;
    for (int p = 0; p < NP; p++) begin dones[p] = 0; rdy[p] = 1; end
    for (int b = 0; b < NB; b++) bus_up[b] = '0;
    repeat (4) @(posedge clk);
    #15 rst = 0;   // between the mid-cycle clk_bus edge and the next clk edge
    repeat (4) @(posedge clk);

    // row vector across a segment boundary (two pieces), then read it back
    npc0 = int'(pieces[0]);
    issue(0, MODE_ROW, 1, 4'hF, 40, 1, 500, 0);
    issue(0, MODE_ROW, 0, 4'hF, 40, 1, 500, 0);
    checks++; if (int'(pieces[0]) - npc0 != 4) begin failures++; $display("FAIL segment split: %0d pieces", int'(pieces[0]) - npc0); end

    // 2-D array write, read back as array and by columns
    issue(3, MODE_ARRAY, 1, 4'hF, 8, 5, 3000, 700);
    issue(3, MODE_ARRAY, 0, 4'hF, 8, 5, 3000, 700);
    issue(2, MODE_COLUMN, 0, 4'hF, 0, 5, 3003, 700);

    // byte-masked scalar writes
    issue(5, MODE_SCALAR, 1, 4'hF, 0, 0, 77, 0);
    issue(5, MODE_SCALAR, 1, 4'b0101, 0, 0, 77, 0);
    issue(5, MODE_SCALAR, 0, 4'hF, 0, 0, 77, 0);

    // long write: flow control and refresh stalls
    issue(6, MODE_ROW, 1, 4'hF, 300, 1, 20000, 0);
    issue(7, MODE_ROW, 0, 4'hF, 300, 1, 20000, 0);

    // eight ports write concurrently into the same controller: conflicts
    finished = 0;
    for (int p = 0; p < NP; p++) launch(p, 1, 16, 40000 + 16*p);
    wait (finished == NP);
    for (int p = 0; p < NP; p++) issue(p, MODE_ROW, 0, 4'hF, 16, 1, 40000 + 16*p, 0);
    checks++; if (conflicts == 0) begin failures++; $display("FAIL no crossbar conflict seen"); end

    // bandwidth: each port streams one 512-word row from its own controller
    for (int p = 0; p < NP; p++) issue(p, MODE_ROW, 1, 4'hF, 512, 1, 65536 + 512*p, 0);
    t0 = cyc;
    finished = 0;
    for (int p = 0; p < NP; p++) launch(p, 0, 512, 65536 + 512*p);
    wait (finished == NP);
    $display("8 x 512 words read in %0d cycles", cyc - t0);
    checks++; if (cyc - t0 > 512 + 512/50*4 + 40) begin failures++; $display("FAIL bandwidth: %0d cycles", cyc - t0); end

    checks++;
    begin
      int r = 0;
      for (int m = 0; m < NP; m++) r += int'(refreshes[m]);
      if (r == 0) begin failures++; $display("FAIL no refresh"); end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
