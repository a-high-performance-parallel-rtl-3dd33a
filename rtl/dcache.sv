// dcache: data cache of a vector unit, organised as a two-way
// set-associative cache.
//
// The document says only that the data cache uses "a modified
// set-associative mapping" and does not say what the modification is. This
// design therefore builds a plain two-way set-associative cache with one
// least-recently-used bit per set, write-through with no allocation on a
// write miss. Its size follows the block diagram's "4k x 32".
//
// Interface: a request (`req`, `we`, word address `addr`, `wdata`) is
// accepted when `ready` is high. A read hit returns the word on `rdata` with
// `rvalid` the next cycle. A read miss raises `fill_req` for one cycle with
// the line address, takes LINE words on `fill_valid`/`fill_data` into the
// least recently used way, then returns the word. Every write is passed to
// memory on `mem_we`/`mem_addr`/`mem_wdata` in the cycle after it is
// accepted, and updates the cached copy when it hits.
module dcache #(
  parameter int unsigned ADDR_W = 28,
  parameter int unsigned WORDS  = 4096,
  parameter int unsigned LINE   = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              req,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [31:0]       wdata,
  output logic              ready,
  output logic              rvalid,
  output logic [31:0]       rdata,
  output logic              fill_req,
  output logic [ADDR_W-1:0] fill_addr,
  input  logic              fill_valid,
  input  logic [31:0]       fill_data,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [31:0]       mem_wdata,
  output logic [15:0]       hits,
  output logic [15:0]       misses
);
  localparam int unsigned OB = $clog2(LINE);
  localparam int unsigned NS = WORDS / LINE / 2;     // sets
  localparam int unsigned SB = $clog2(NS);
  localparam int unsigned TB = ADDR_W - SB - OB;

  logic [31:0]   data [2][NS*LINE];
  logic [TB-1:0] tags [2][NS];
  logic [NS-1:0] valid [2];
  logic [NS-1:0] lru;                 // way to replace next

  typedef enum logic [1:0] {D_IDLE, D_FILL, D_REPLY} state_e;
  state_e state;

  logic [ADDR_W-1:0] a_q;
  logic [OB-1:0]     cnt;
  logic              way_q;

  logic [SB-1:0] set;
  logic [TB-1:0] tag;
  logic [1:0]    hit_w;
  assign set   = addr[OB +: SB];
  assign tag   = addr[ADDR_W-1 -: TB];
  assign hit_w = {valid[1][set] && tags[1][set] == tag, valid[0][set] && tags[0][set] == tag};

  assign ready     = (state == D_IDLE);
  assign fill_addr = {a_q[ADDR_W-1:OB], {OB{1'b0}}};

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= D_IDLE; valid[0] <= '0; valid[1] <= '0; lru <= '0;
      rvalid <= 1'b0; rdata <= '0; fill_req <= 1'b0; a_q <= '0; cnt <= '0; way_q <= 1'b0;
      mem_we <= 1'b0; mem_addr <= '0; mem_wdata <= '0; hits <= '0; misses <= '0;
    end else begin
      rvalid   <= 1'b0;
      fill_req <= 1'b0;
      mem_we   <= 1'b0;
      unique case (state)
        D_IDLE: if (req) begin
          a_q <= addr;
          if (we) begin
            mem_we    <= 1'b1;
            mem_addr  <= addr;
            mem_wdata <= wdata;
            if (|hit_w) begin
              data[hit_w[1]][{set, addr[OB-1:0]}] <= wdata;
              lru[set] <= ~hit_w[1];
            end
          end else if (|hit_w) begin
            rvalid   <= 1'b1;
            rdata    <= data[hit_w[1]][{set, addr[OB-1:0]}];
            lru[set] <= ~hit_w[1];
            hits     <= hits + 1'b1;
          end else begin
            fill_req <= 1'b1;
            cnt      <= '0;
            way_q    <= lru[set];
            misses   <= misses + 1'b1;
            state    <= D_FILL;
          end
        end
        D_FILL: if (fill_valid) begin
          data[way_q][{a_q[OB +: SB], cnt}] <= fill_data;
          cnt <= cnt + 1'b1;
          if (cnt == OB'(LINE - 1)) begin
            valid[way_q][a_q[OB +: SB]] <= 1'b1;
            tags[way_q][a_q[OB +: SB]]  <= a_q[ADDR_W-1 -: TB];
            lru[a_q[OB +: SB]]          <= ~way_q;
            state <= D_REPLY;
          end
        end
        D_REPLY: begin
          rvalid <= 1'b1;
          rdata  <= data[way_q][a_q[OB+SB-1:0]];
          state  <= D_IDLE;
        end
        default: state <= D_IDLE;
      endcase
    end
  end
endmodule
