// icache: direct-mapped instruction cache of a vector unit.
//
// The document gives the placement policy (direct mapping) for the
// instruction cache. Its size is printed as "4k x 32" in the block diagram
// while the text speaks of 4 kbytes; the default here, 4096 words, follows
// the diagram. Line size, the refill interface and the reset state are this
// design's choices.
//
// Interface: a request (`req`, word address `addr`) is accepted when `ready`
// is high. On a hit the word comes back on `rdata` with `rvalid` the next
// cycle. On a miss the cache raises `fill_req` for one cycle with the line
// address `fill_addr`, takes LINE words on `fill_valid`/`fill_data` in
// address order, writes the line, and then returns the requested word.
// `flush` invalidates every line. `hits` and `misses` count lookups.
module icache #(
  parameter int unsigned ADDR_W = 28,
  parameter int unsigned WORDS  = 4096,
  parameter int unsigned LINE   = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              flush,
  input  logic              req,
  input  logic [ADDR_W-1:0] addr,
  output logic              ready,
  output logic              rvalid,
  output logic [31:0]       rdata,
  output logic              fill_req,
  output logic [ADDR_W-1:0] fill_addr,
  input  logic              fill_valid,
  input  logic [31:0]       fill_data,
  output logic [15:0]       hits,
  output logic [15:0]       misses
);
  localparam int unsigned OB = $clog2(LINE);
  localparam int unsigned NL = WORDS / LINE;
  localparam int unsigned IB = $clog2(NL);
  localparam int unsigned TB = ADDR_W - IB - OB;

  logic [31:0]   data  [WORDS];
  logic [TB-1:0] tags  [NL];
  logic [NL-1:0] valid;

  typedef enum logic [1:0] {C_IDLE, C_FILL, C_REPLY} state_e;
  state_e state;

  logic [ADDR_W-1:0] a_q;
  logic [OB-1:0]     cnt;

  logic [IB-1:0] idx;
  logic [TB-1:0] tag;
  logic          hit;
  assign idx = addr[OB +: IB];
  assign tag = addr[ADDR_W-1 -: TB];
  assign hit = valid[idx] && tags[idx] == tag;

  assign ready     = (state == C_IDLE);
  assign fill_addr = {a_q[ADDR_W-1:OB], {OB{1'b0}}};

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= C_IDLE;
      valid    <= '0;
      rvalid   <= 1'b0;
      rdata    <= '0;
      fill_req <= 1'b0;
      a_q      <= '0;
      cnt      <= '0;
      hits     <= '0;
      misses   <= '0;
    end else begin
      rvalid   <= 1'b0;
      fill_req <= 1'b0;
      unique case (state)
        C_IDLE: begin
          if (flush) begin
            valid <= '0;
          end else if (req) begin
            a_q <= addr;
            if (hit) begin
              rvalid <= 1'b1;
              rdata  <= data[addr[OB+IB-1:0]];
              hits   <= hits + 1'b1;
            end else begin
              fill_req <= 1'b1;
              cnt      <= '0;
              misses   <= misses + 1'b1;
              state    <= C_FILL;
            end
          end
        end
        C_FILL: if (fill_valid) begin
          data[{a_q[OB +: IB], cnt}] <= fill_data;
          cnt <= cnt + 1'b1;
          if (cnt == OB'(LINE - 1)) begin
            valid[a_q[OB +: IB]] <= 1'b1;
            tags[a_q[OB +: IB]]  <= a_q[ADDR_W-1 -: TB];
            state <= C_REPLY;
          end
        end
        C_REPLY: begin
          rvalid <= 1'b1;
          rdata  <= data[a_q[OB+IB-1:0]];
          state  <= C_IDLE;
        end
        default: state <= C_IDLE;
      endcase
    end
  end
endmodule
