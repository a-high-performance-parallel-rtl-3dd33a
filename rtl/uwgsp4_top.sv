// uwgsp4_top: the imaging and graphics system as a whole.
//
// Sixteen vector processing units do the imaging work; they talk to each
// other only through a shared memory reached over four high-speed buses, an
// 8 x 8 crossbar and 32-way interleaved memory; a hardware token ring
// serialises their access to shared variables; a graphics subsystem draws
// Z-buffered, Gouraud-shaded spans into a double-buffered frame buffer and
// refreshes the screen from it.
//
// What is inside: the shared memory system (bus interface units, port
// controllers, crossbar, memory controllers, memory modules), the token
// ring, the datapath of each vector unit (register files, vector
// sequencer, pixel formatter, FIFOs, caches) and the raster back end (span
// distributor, four BBIs, frame/Z-buffer slices, video refresh).
//
// What is brought out as ports, because it is bought-in or not specified:
// each vector unit's FPUs, its instruction issue, and its link to a bus
// (the vpu_in_t / vpu_out_t bundles); the four high-speed buses themselves,
// where the vector units' bus interfaces and the graphics subsystem's two
// bus interfaces attach (bus_up / bus_dn, one 40-bit word per 80 MHz slot);
// the span input from the polygon pipelines; and the video output towards
// the cursor, overlay and RAMDAC stage.
//
// Clocks: clk is the 40 MHz system clock, clk_bus the 80 MHz bus clock,
// rising together with every second clk_bus edge (see mem_biu for reset).
//
// The set of blocks, their counts and how they connect follow the
// published system diagrams; the sizes are its numbers (16 units, 1 Gbyte,
// 1280 x 1024). Bringing the processor side of the buses out as ports, and
// feeding spans straight into the raster back end rather than over a bus,
// are this design's choices.
module uwgsp4_top
  import uwgsp4_pkg::*;
#(
  parameter int unsigned N_VPU    = 16,
  parameter int unsigned N_BUS    = 4,
  parameter int unsigned MOD_BITS = 23,
  parameter int unsigned H_ACTIVE = 1280,
  parameter int unsigned V_ACTIVE = 1024,
  parameter int unsigned H_BLANK  = 408,
  parameter int unsigned V_BLANK  = 42,
  parameter int unsigned REFRESH_PERIOD = 624
) (
  input  logic        clk,
  input  logic        clk_bus,
  input  logic        rst,
  // high-speed buses
  input  up_word_t    bus_up   [N_BUS],
  output dn_word_t    bus_dn   [N_BUS],
  output logic        bus_slot [N_BUS],
  // vector processing units
  input  vpu_in_t     vpu_in   [N_VPU],
  output vpu_out_t    vpu_out  [N_VPU],
  input  logic [N_VPU-1:0] sync_req,
  output logic [N_VPU-1:0] sync_grant,
  // graphics
  input  logic        span_valid,
  input  span_t       span,
  output logic        span_ready,
  input  logic        swap_req,
  output logic        swap_done,
  output logic        front,
  output logic        de, hsync, vsync,
  output logic [23:0] rgb,
  // activity counters
  output logic [15:0] mem_pieces    [2*N_BUS],
  output logic [15:0] mem_refreshes [2*N_BUS],
  output logic [15:0] xbar_conflicts,
  output logic [15:0] frames,
  output logic [31:0] pixels_written [4],
  output logic [31:0] pixels_hidden  [4],
  output logic [15:0] dist_waits
);
  logic [N_VPU-1:0] token;
  logic [3:0]       bbi_idle;

  shared_memory #(.N_BUS(N_BUS), .MOD_BITS(MOD_BITS), .REFRESH_PERIOD(REFRESH_PERIOD)) u_mem (
    .clk, .clk_bus, .rst, .bus_up, .bus_dn, .bus_slot,
    .pieces(mem_pieces), .refreshes(mem_refreshes), .conflicts(xbar_conflicts));

  ipsync_ring #(.N(N_VPU)) u_sync (
    .clk, .rst, .req(sync_req), .grant(sync_grant), .token);

  for (genvar v = 0; v < N_VPU; v++) begin : g_vpu
    vpu_datapath u_vpu (.clk, .rst, .i(vpu_in[v]), .o(vpu_out[v]));
  end

  raster_backend #(.H_ACTIVE(H_ACTIVE), .V_ACTIVE(V_ACTIVE), .H_BLANK(H_BLANK), .V_BLANK(V_BLANK)) u_gfx (
    .clk, .rst, .span_valid, .span, .span_ready, .swap_req, .swap_done, .front,
    .de, .hsync, .vsync, .rgb, .frames, .pixels_written, .pixels_hidden,
    .dist_waits, .bbi_idle);
endmodule
