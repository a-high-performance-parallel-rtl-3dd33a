// vpu_datapath: the datapath of one vector processing unit, without its
// FPUs and without the instruction issue logic of its control ASIC.
//
// Holds the 64 x 32 scalar register file, three 2048-word vector register
// files (A, B, C), the vector sequencer that runs C = A op B through the two
// external FPUs, the pixel formatter unit with FIFOs towards the memory bus,
// and the instruction and data caches. As in the document, only A and B
// are loaded from shared memory (through the PFU), results accumulate in C,
// and C is stored to shared memory or moved to A/B through the PFU. The
// register file ports are fixed to these roles, so the sequencer and the
// PFU can run at the same time (loading A/B while a previous result is
// being stored from C).
//
// The memory side is a pair of word streams: words arriving from shared
// memory are pushed into the input FIFO (`mem_in_*`, with `mem_in_ready`
// meaning the FIFO has room) and words produced by the PFU wait in the
// output FIFO until `mem_out_pop`. How the commands are issued is outside
// this block: the document does not give the control ASIC's instruction
// set, so the command ports are brought out. All inputs are gathered in one
// vpu_in_t and all outputs in one vpu_out_t (see uwgsp4_pkg).
module vpu_datapath
  import uwgsp4_pkg::*;
#(
  parameter int unsigned CWORDS     = 4096,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic     clk,
  input  logic     rst,
  input  vpu_in_t  i,
  output vpu_out_t o
);
  localparam int unsigned AW = VAW;

  scalar_regfile #(.DEPTH(2**SAW)) u_sreg (
    .clk, .rst, .ra0(i.s_ra0), .ra1(i.s_ra1), .rd0(o.s_rd0), .rd1(o.s_rd1),
    .we0(i.s_we0), .we1(i.s_we1), .wa0(i.s_wa0), .wa1(i.s_wa1), .wd0(i.s_wd0), .wd1(i.s_wd1));

  // vector register files
  logic          a_re, b_re, c_re_p, c_we;
  logic [AW-1:0] a_raddr, b_raddr, c_raddr, c_waddr, ab_waddr;
  logic [31:0]   a_rdata, b_rdata, c_rdata, c_wdata, ab_wdata;
  logic          ab_we, ab_sel_b;

  vector_regfile #(.DEPTH(2**VAW)) u_vra (
    .clk, .re(a_re), .raddr(a_raddr), .rdata(a_rdata),
    .we(ab_we && !ab_sel_b), .waddr(ab_waddr), .wdata(ab_wdata));
  vector_regfile #(.DEPTH(2**VAW)) u_vrb (
    .clk, .re(b_re), .raddr(b_raddr), .rdata(b_rdata),
    .we(ab_we && ab_sel_b), .waddr(ab_waddr), .wdata(ab_wdata));
  vector_regfile #(.DEPTH(2**VAW)) u_vrc (
    .clk, .re(c_re_p), .raddr(c_raddr), .rdata(c_rdata),
    .we(c_we), .waddr(c_waddr), .wdata(c_wdata));

  logic [31:0] fpu_r [2];
  assign fpu_r[0] = i.fpu_r0;
  assign fpu_r[1] = i.fpu_r1;

  vector_sequencer #(.AW(AW)) u_seq (
    .clk, .rst, .start(i.v_start), .op(i.v_op),
    .a_base(i.a_base), .a_sx(i.a_sx), .a_sy(i.a_sy), .b_base(i.b_base), .b_sx(i.b_sx), .b_sy(i.b_sy),
    .c_base(i.c_base), .c_sx(i.c_sx), .c_sy(i.c_sy),
    .count_x(i.v_count_x), .count_y(i.v_count_y), .busy(o.v_busy), .done(o.v_done),
    .a_re, .b_re, .a_raddr, .b_raddr, .a_rdata, .b_rdata,
    .c_we, .c_waddr, .c_wdata,
    .fpu_valid(o.fpu_valid), .fpu_op(o.fpu_op), .fpu_a(o.fpu_a), .fpu_b(o.fpu_b),
    .fpu_rvalid(i.fpu_rvalid), .fpu_r(fpu_r));

  // memory-side FIFOs
  logic        fi_empty, fi_full, fo_empty, fo_full;
  logic [31:0] fi_dout;
  logic        pfu_in_ready, pfu_out_valid;
  logic [31:0] pfu_out_word;
  logic [$clog2(FIFO_DEPTH+1)-1:0] fi_count, fo_count;

  sync_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_fifo_in (
    .clk, .rst, .push(i.mem_in_valid), .din(i.mem_in_word), .pop(pfu_in_ready && !fi_empty),
    .dout(fi_dout), .empty(fi_empty), .full(fi_full), .count(fi_count));
  sync_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_fifo_out (
    .clk, .rst, .push(pfu_out_valid), .din(pfu_out_word), .pop(i.mem_out_pop),
    .dout(o.mem_out_word), .empty(fo_empty), .full(fo_full), .count(fo_count));

  assign o.mem_in_ready  = !fi_full;
  assign o.mem_out_valid = !fo_empty;

  pixel_formatter #(.AW(AW)) u_pfu (
    .clk, .rst, .start(i.p_start), .mode(i.p_mode), .count(i.p_count),
    .src_base(i.p_src), .dst_base(i.p_dst), .dst_b(i.p_dst_b), .busy(o.p_busy), .done(o.p_done),
    .in_valid(!fi_empty), .in_word(fi_dout), .in_ready(pfu_in_ready),
    .out_valid(pfu_out_valid), .out_word(pfu_out_word),
    .ab_we, .ab_sel_b, .ab_waddr, .ab_wdata,
    .c_re(c_re_p), .c_raddr, .c_rdata);

  logic [15:0] ic_hits, ic_misses, dc_hits, dc_misses;

  icache #(.ADDR_W(ADDR_W), .WORDS(CWORDS)) u_icache (
    .clk, .rst, .flush(1'b0), .req(i.ic_req), .addr(i.ic_addr), .ready(o.ic_ready),
    .rvalid(o.ic_rvalid), .rdata(o.ic_rdata), .fill_req(o.ic_fill_req), .fill_addr(o.ic_fill_addr),
    .fill_valid(i.ic_fill_valid), .fill_data(i.ic_fill_data), .hits(ic_hits), .misses(ic_misses));

  dcache #(.ADDR_W(ADDR_W), .WORDS(CWORDS)) u_dcache (
    .clk, .rst, .req(i.dc_req), .we(i.dc_we), .addr(i.dc_addr), .wdata(i.dc_wdata), .ready(o.dc_ready),
    .rvalid(o.dc_rvalid), .rdata(o.dc_rdata), .fill_req(o.dc_fill_req), .fill_addr(o.dc_fill_addr),
    .fill_valid(i.dc_fill_valid), .fill_data(i.dc_fill_data),
    .mem_we(o.dc_mem_we), .mem_addr(o.dc_mem_addr), .mem_wdata(o.dc_mem_wdata),
    .hits(dc_hits), .misses(dc_misses));

  a_out_fifo_room: assert property (@(posedge clk) disable iff (rst) !(pfu_out_valid && fo_full && !i.mem_out_pop));
endmodule
