// uwgsp4_pkg: types and constants shared by the shared-memory system, the
// vector-unit datapath and the raster back end.
//
// The 40-bit word used on the high-speed buses and through the crossbar is
// 32 data bits plus 8 control bits, as the document states; how the 8 control
// bits are laid out is this design's own choice and is defined here.
package uwgsp4_pkg;

  // ---------------------------------------------------------------- memory
  localparam int unsigned ADDR_W   = 28;   // 256 Mwords of 32 bits = 1 Gbyte
  localparam int unsigned N_MC     = 8;    // memory controllers
  localparam int unsigned N_MOD    = 4;    // interleaved modules per controller
  localparam int unsigned LEN_W    = 12;   // element counts per dimension

  // Access modes of a processor command.
  typedef enum logic [1:0] {
    MODE_SCALAR = 2'd0,   // one word at base
    MODE_ROW    = 2'd1,   // count_x consecutive words
    MODE_COLUMN = 2'd2,   // count_y words, stride apart
    MODE_ARRAY  = 2'd3    // count_y rows of count_x words, rows stride apart
  } acc_mode_e;

  // Kind of an upstream bus word (processor -> shared memory).
  typedef enum logic [2:0] {
    UP_IDLE   = 3'd0,
    UP_HDR    = 3'd1,     // data = {mode, we, bmask, count_y, count_x}
    UP_ADDR   = 3'd2,     // data = base word address
    UP_STRIDE = 3'd3,     // data = row pitch in words
    UP_WDATA  = 3'd4      // data = one write word
  } up_kind_e;

  // 40-bit upstream bus word: ctrl = {kind, src, spare}.
  typedef struct packed {
    up_kind_e    kind;
    logic [1:0]  src;     // which processor of the port controller's group
    logic [2:0]  spare;
    logic [31:0] data;
  } up_word_t;

  // 40-bit downstream bus word: ctrl = {rvalid, ready, done, src, spare}.
  typedef struct packed {
    logic        rvalid;  // data holds a read word
    logic        ready;   // the port controller accepts upstream words
    logic        done;    // a command has completed (pulse)
    logic [1:0]  src;     // processor the read word or completion is for
    logic [2:0]  spare;
    logic [31:0] data;
  } dn_word_t;

  // Header word fields.
  typedef struct packed {
    acc_mode_e        mode;
    logic             we;
    logic [3:0]       bmask;
    logic [LEN_W-1:0] count_y;
    logic [LEN_W-1:0] count_x;
    logic [0:0]       spare;
  } hdr_t;

  // Crossbar word from a port controller to a memory controller.
  typedef enum logic [1:0] {
    XK_IDLE  = 2'd0,
    XK_ADDR  = 2'd1,      // data = word address, ctrl carries we and bmask
    XK_LEN   = 2'd2,      // data = number of words
    XK_WDATA = 2'd3
  } x_kind_e;

  typedef struct packed {
    x_kind_e     kind;
    logic        we;
    logic [3:0]  bmask;
    logic        spare;
    logic [31:0] data;
  } xreq_t;               // 40 bits

  typedef struct packed {
    logic        rvalid;  // data holds a read word
    logic        ready;   // the controller accepts a write word this cycle
    logic        done;    // the command has completed
    logic [4:0]  spare;
    logic [31:0] data;
  } xrsp_t;               // 40 bits

  // ------------------------------------------------------ vector unit
  localparam int unsigned VAW = 11;    // 2048-word vector register files
  localparam int unsigned SAW = 6;     // 64 scalar registers

  // Everything driven into one vector unit datapath from outside: its
  // control (the issue logic of the control ASIC), its FPUs and its memory.
  typedef struct packed {
    logic [SAW-1:0] s_ra0, s_ra1, s_wa0, s_wa1;
    logic           s_we0, s_we1;
    logic [31:0]    s_wd0, s_wd1;
    logic           v_start;
    logic [3:0]     v_op;
    logic [VAW-1:0] a_base, a_sx, a_sy, b_base, b_sx, b_sy, c_base, c_sx, c_sy;
    logic [11:0]    v_count_x, v_count_y;
    logic [1:0]     fpu_rvalid;
    logic [31:0]    fpu_r0, fpu_r1;
    logic           p_start;
    logic [2:0]     p_mode;
    logic [VAW:0]   p_count;
    logic [VAW-1:0] p_src, p_dst;
    logic           p_dst_b;
    logic           mem_in_valid;
    logic [31:0]    mem_in_word;
    logic           mem_out_pop;
    logic           ic_req;
    logic [ADDR_W-1:0] ic_addr;
    logic           ic_fill_valid;
    logic [31:0]    ic_fill_data;
    logic           dc_req, dc_we;
    logic [ADDR_W-1:0] dc_addr;
    logic [31:0]    dc_wdata;
    logic           dc_fill_valid;
    logic [31:0]    dc_fill_data;
  } vpu_in_t;

  // Everything one vector unit datapath drives out.
  typedef struct packed {
    logic [31:0]    s_rd0, s_rd1;
    logic           v_busy, v_done;
    logic [1:0]     fpu_valid;
    logic [3:0]     fpu_op;
    logic [31:0]    fpu_a, fpu_b;
    logic           p_busy, p_done;
    logic           mem_in_ready;
    logic           mem_out_valid;
    logic [31:0]    mem_out_word;
    logic           ic_ready, ic_rvalid;
    logic [31:0]    ic_rdata;
    logic           ic_fill_req;
    logic [ADDR_W-1:0] ic_fill_addr;
    logic           dc_ready, dc_rvalid;
    logic [31:0]    dc_rdata;
    logic           dc_fill_req;
    logic [ADDR_W-1:0] dc_fill_addr;
    logic           dc_mem_we;
    logic [ADDR_W-1:0] dc_mem_addr;
    logic [31:0]    dc_mem_wdata;
  } vpu_out_t;

  // ---------------------------------------------------------------- raster
  // One span of a polygon: pixels x0 .. x0+len-1 of line y. z and the
  // colour channels are fixed point with 8 fraction bits and are stepped
  // by their deltas per pixel (Gouraud shading).
  typedef struct packed {
    logic [10:0] x0;
    logic [10:0] len;
    logic [9:0]  y;
    logic        ztest;     // 1: write only if nearer (smaller z)
    logic [31:0] z;         // 24.8
    logic [31:0] dz;
    logic [15:0] r, g, b;   // 8.8
    logic [15:0] dr, dg, db;
    logic [7:0]  alpha;     // written into the top byte of the pixel
  } span_t;

endpackage
