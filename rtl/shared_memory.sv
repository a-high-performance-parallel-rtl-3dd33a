// shared_memory: the shared memory and interconnection network. Four
// high-speed buses each enter a bus interface unit that splits it between
// two port controllers; the eight port controllers reach eight memory
// controllers through an 8 x 8 crossbar; each memory controller drives four
// interleaved memory modules (32-way interleaving in all).
//
// Word address mapping (this design's choice, the document only says
// 32-way interleaving): bits [1:0] select the module inside a controller,
// bits [SEG_BITS+2:SEG_BITS] select the controller, so a run of 2^SEG_BITS
// consecutive words (a 512-pixel image row at the default) streams from one
// controller at one word per cycle while the eight controllers serve
// different ports in parallel: 8 x 160 = 1,280 Mbyte/s at 40 MHz.
//
// Port controller 2b and 2b+1 sit on bus b. clk is the 40 MHz memory clock,
// clk_bus the 80 MHz bus clock (see mem_biu for their alignment).
module shared_memory
  import uwgsp4_pkg::*;
#(
  parameter int unsigned N_BUS          = 4,
  parameter int unsigned MOD_BITS       = 23,
  parameter int unsigned SEG_BITS       = 9,
  parameter int unsigned REFRESH_PERIOD = 624,
  parameter int unsigned REFRESH_CYCLES = 4
) (
  input  logic        clk,
  input  logic        clk_bus,
  input  logic        rst,
  input  up_word_t    bus_up   [N_BUS],
  output dn_word_t    bus_dn   [N_BUS],
  output logic        bus_slot [N_BUS],
  output logic [15:0] pieces   [2*N_BUS],  // row-vector commands per port
  output logic [15:0] refreshes[2*N_BUS],  // refresh bursts per controller
  output logic [15:0] conflicts            // crossbar waits
);
  localparam int unsigned NP = 2 * N_BUS;

  up_word_t pc_up  [NP];
  dn_word_t pc_dn  [NP];
  logic [NP-1:0]        x_req, x_grant;
  logic [$clog2(NP)-1:0] x_dest [NP];
  xreq_t p2x [NP];
  xrsp_t x2p [NP];
  xreq_t x2m [NP];
  xrsp_t m2x [NP];

  for (genvar b = 0; b < N_BUS; b++) begin : g_bus
    up_word_t u [2];
    dn_word_t d [2];
    mem_biu u_biu (.clk_bus, .rst, .bus_up(bus_up[b]), .bus_dn(bus_dn[b]),
                   .bus_slot(bus_slot[b]), .pc_up(u), .pc_dn(d));
    assign pc_up[2*b]   = u[0];
    assign pc_up[2*b+1] = u[1];
    assign d[0] = pc_dn[2*b];
    assign d[1] = pc_dn[2*b+1];
  end

  for (genvar p = 0; p < NP; p++) begin : g_pc
    logic [2:0] dest3;
    port_controller #(.SEG_BITS(SEG_BITS)) u_pc (
      .clk, .rst, .up(pc_up[p]), .dn(pc_dn[p]),
      .x_req(x_req[p]), .x_dest(dest3), .x_grant(x_grant[p]),
      .x_out(p2x[p]), .x_in(x2p[p]), .pieces(pieces[p]));
    assign x_dest[p] = $clog2(NP)'(dest3);
  end

  crossbar #(.N(NP)) u_xbar (
    .clk, .rst, .req(x_req), .dest(x_dest), .grant(x_grant),
    .p_in(p2x), .p_out(x2p), .m_out(x2m), .m_in(m2x), .conflicts);

  for (genvar m = 0; m < NP; m++) begin : g_mc
    logic [N_MOD-1:0]    en;
    logic                we;
    logic [3:0]          bmask;
    logic [MOD_BITS-1:0] addr;
    logic [31:0]         wdata;
    logic [31:0]         rdata [N_MOD];
    memory_controller #(.MOD_BITS(MOD_BITS), .SEG_BITS(SEG_BITS),
                        .REFRESH_PERIOD(REFRESH_PERIOD), .REFRESH_CYCLES(REFRESH_CYCLES)) u_mc (
      .clk, .rst, .xin(x2m[m]), .xout(m2x[m]),
      .m_en(en), .m_we(we), .m_bmask(bmask), .m_addr(addr), .m_wdata(wdata),
      .m_rdata(rdata), .refresh_count(refreshes[m]));
    for (genvar k = 0; k < N_MOD; k++) begin : g_mod
      mem_module #(.DEPTH_BITS(MOD_BITS)) u_mod (
        .clk, .en(en[k]), .we, .bmask, .addr, .wdata, .rdata(rdata[k]));
    end
  end
endmodule
