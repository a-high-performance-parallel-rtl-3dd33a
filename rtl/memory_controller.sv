// memory_controller: executes row-vector commands arriving over the crossbar
// against four interleaved memory modules, and refreshes them.
//
// A command is two crossbar words, XK_ADDR (start word address, write flag
// and byte mask) then XK_LEN (word count). The controller then generates the
// physical address of each word: the low two bits of the word address pick
// the module, the rest (with this controller's select bits removed) is the
// address inside the module. It moves one word per cycle, which at 40 MHz is
// the document's 160 Mbyte/s per controller. For a write it takes one
// XK_WDATA word per cycle. `ready` says that the word presented this cycle
// (command or write data) is taken at the coming edge; the sender holds it
// otherwise; for a read it returns
// each word with `rvalid` two cycles after issuing it (module read latency
// plus an output register). `done` pulses when the last word has been
// written or returned.
//
// Refresh: every REFRESH_PERIOD cycles the controller owes a refresh burst
// of REFRESH_CYCLES cycles; it performs it as soon as it is between words,
// stalling the stream (ready low) meanwhile. The document says only that the
// controllers refresh the DRAM; the period and burst length are assumptions
// (15.6 us at 40 MHz is 624 cycles).
module memory_controller
  import uwgsp4_pkg::*;
#(
  parameter int unsigned MOD_BITS       = 23,   // address bits per module
  parameter int unsigned SEG_BITS       = 9,    // words per segment (log2)
  parameter int unsigned REFRESH_PERIOD = 624,
  parameter int unsigned REFRESH_CYCLES = 4
) (
  input  logic                 clk,
  input  logic                 rst,
  input  xreq_t                xin,
  output xrsp_t                xout,
  // module side
  output logic [N_MOD-1:0]     m_en,
  output logic                 m_we,
  output logic [3:0]           m_bmask,
  output logic [MOD_BITS-1:0]  m_addr,
  output logic [31:0]          m_wdata,
  input  logic [31:0]          m_rdata [N_MOD],
  output logic [15:0]          refresh_count   // refresh bursts performed
);
  typedef enum logic [1:0] {S_IDLE, S_LEN, S_RUN, S_REFRESH} state_e;
  state_e state;

  logic [ADDR_W-1:0] addr;
  logic [15:0]       remaining;
  logic              we;
  logic [3:0]        bmask;
  logic [15:0]       rf_timer;
  logic              rf_owed;
  logic [7:0]        rf_left;

  // read return pipeline
  logic              rd_p1, rd_p1_last;
  logic [1:0]        rd_p1_mod;
  logic              rd_p2, rd_p2_last;
  logic [31:0]       rd_p2_data;

  logic issue;       // a word is moved this cycle
  assign issue = (state == S_RUN) && !rf_owed && (remaining != 0) &&
                 (!we || xin.kind == XK_WDATA);

  // Physical address: drop the module bits [1:0] and the controller select
  // bits [SEG_BITS+2:SEG_BITS].
  function automatic logic [MOD_BITS-1:0] phys(input logic [ADDR_W-1:0] a);
    logic [ADDR_W-1:0] hi, lo;
    hi = a >> (SEG_BITS + 3);
    lo = (a & ((ADDR_W'(1) << SEG_BITS) - 1)) >> 2;
    return MOD_BITS'((hi << (SEG_BITS - 2)) | lo);
  endfunction

  always_comb begin
    m_en    = '0;
    m_en[addr[1:0]] = issue;
    m_we    = we;
    m_bmask = bmask;
    m_addr  = phys(addr);
    m_wdata = xin.data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state         <= S_IDLE;
      remaining     <= '0;
      addr          <= '0;
      we            <= 1'b0;
      bmask         <= '0;
      rf_timer      <= '0;
      rf_owed       <= 1'b0;
      rf_left       <= '0;
      refresh_count <= '0;
      rd_p1 <= 1'b0; rd_p1_last <= 1'b0; rd_p1_mod <= '0;
      rd_p2 <= 1'b0; rd_p2_last <= 1'b0; rd_p2_data <= '0;
    end else begin
      // refresh timer
      if (rf_timer == 16'(REFRESH_PERIOD - 1)) begin
        rf_timer <= '0;
        rf_owed  <= 1'b1;
      end else begin
        rf_timer <= rf_timer + 1'b1;
      end

      case (state)
        S_IDLE: begin
          if (rf_owed) begin
            state   <= S_REFRESH;
            rf_left <= 8'(REFRESH_CYCLES - 1);
          end else if (xin.kind == XK_ADDR && xout.ready) begin
            addr  <= xin.data[ADDR_W-1:0];
            we    <= xin.we;
            bmask <= xin.bmask;
            state <= S_LEN;
          end
        end
        S_LEN: if (xin.kind == XK_LEN && xout.ready) begin
          remaining <= xin.data[15:0];
          state     <= S_RUN;
        end
        S_RUN: begin
          if (rf_owed) begin
            state   <= S_REFRESH;
            rf_left <= 8'(REFRESH_CYCLES - 1);
          end else if (issue) begin
            addr      <= addr + 1'b1;
            remaining <= remaining - 1'b1;
          end else if (remaining == 0 && !rd_p1 && !rd_p2) begin
            state <= S_IDLE;
          end
        end
        S_REFRESH: begin
          if (rf_left == 0) begin
            rf_owed       <= 1'b0;
            refresh_count <= refresh_count + 1'b1;
            state         <= (remaining != 0) ? S_RUN : S_IDLE;
          end else begin
            rf_left <= rf_left - 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase

      rd_p1      <= issue && !we;
      rd_p1_last <= issue && (remaining == 1);
      rd_p1_mod  <= addr[1:0];
      rd_p2      <= rd_p1;
      rd_p2_data <= m_rdata[rd_p1_mod];
      rd_p2_last <= rd_p1_last;
    end
  end

  always_comb begin
    xout        = '0;
    xout.rvalid = rd_p2;
    xout.data   = rd_p2_data;
    unique case (state)
      S_IDLE:  xout.ready = !rf_owed;
      S_LEN:   xout.ready = 1'b1;
      S_RUN:   xout.ready = !rf_owed && we && (remaining != 0);
      default: xout.ready = 1'b0;
    endcase
    xout.done   = rd_p2_last;
  end
endmodule
