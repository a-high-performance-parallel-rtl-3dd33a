// port_controller: turns the memory commands of the vector units on one
// half of a high-speed bus into row-vector commands for the memory
// controllers, and steers the crossbar.
//
// Upstream words (up_word_t, one per 40 MHz cycle from the bus interface)
// all go into a FIFO. A command is three words, UP_HDR (mode, write flag,
// byte mask, count_y, count_x), UP_ADDR (base word address) and UP_STRIDE
// (row pitch), followed for a write by its UP_WDATA words. The four modes of
// the document are supported: a scalar, a row vector, a column vector and a
// 2-D array. The controller walks the command row by row (a column vector
// is count_y rows of one word) and cuts each row at segment boundaries: a
// segment is 2^SEG_BITS consecutive words, all held by one memory controller
// (address bits [SEG_BITS+2:SEG_BITS] pick the controller, bits [1:0] the
// module inside it). For every piece it requests the crossbar path to that
// controller, sends XK_ADDR and XK_LEN, streams the write words or forwards
// the returned read words downstream tagged with the requester's number,
// waits for the controller's done and releases the path. The pieces are
// issued one after another, as the document describes. `done` goes
// downstream once the whole command has completed.
//
// Flow control (this design's choice): the downstream `ready` bit is high
// while the FIFO has room for at least SLACK more words, which covers the
// words still in flight through the bus interface. Up to four requesters
// can be tagged (src is 2 bits); the document attaches two and allows four.
module port_controller
  import uwgsp4_pkg::*;
#(
  parameter int unsigned SEG_BITS   = 9,
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned SLACK      = 6
) (
  input  logic        clk,
  input  logic        rst,
  input  up_word_t    up,
  output dn_word_t    dn,
  // crossbar side
  output logic        x_req,
  output logic [2:0]  x_dest,
  input  logic        x_grant,
  output xreq_t       x_out,
  input  xrsp_t       x_in,
  output logic [15:0] pieces     // row-vector commands issued so far
);
  typedef enum logic [2:0] {P_HDR, P_ADDR, P_STRIDE, P_PLAN, P_REQ, P_CADDR, P_CLEN, P_DATA} state_e;
  state_e state;

  // upstream FIFO
  up_word_t                         f_out;
  logic                             f_pop, f_empty, f_full;
  logic [$clog2(FIFO_DEPTH+1)-1:0]  f_count;
  sync_fifo #(.WIDTH($bits(up_word_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst, .push(up.kind != UP_IDLE), .din(up), .pop(f_pop),
    .dout(f_out), .empty(f_empty), .full(f_full), .count(f_count));

  hdr_t              hdr;
  logic [1:0]        src;
  logic [ADDR_W-1:0] row_base, stride;
  logic [LEN_W-1:0]  nx, ny, col, row;
  logic [LEN_W-1:0]  piece;          // words in the current piece
  logic [LEN_W-1:0]  sent;           // write words of the piece handed over
  logic [ADDR_W-1:0] cur;

  assign cur = row_base + ADDR_W'(col);

  // words of the current row that fit before the segment ends
  function automatic logic [LEN_W-1:0] piece_len(input logic [ADDR_W-1:0] a,
                                                 input logic [LEN_W-1:0] left);
    logic [SEG_BITS:0] room;
    room = (SEG_BITS+1)'(1 << SEG_BITS) - (SEG_BITS+1)'(a[SEG_BITS-1:0]);
    return (LEN_W'(room) < left) ? LEN_W'(room) : left;
  endfunction

  logic wpop;      // a write word is taken by the memory controller
  assign wpop  = (state == P_DATA) && hdr.we && (sent != piece) && x_in.ready &&
                 !f_empty && f_out.kind == UP_WDATA;
  assign f_pop = (!f_empty && ((state == P_HDR    && f_out.kind == UP_HDR)   ||
                               (state == P_ADDR   && f_out.kind == UP_ADDR)  ||
                               (state == P_STRIDE && f_out.kind == UP_STRIDE))) || wpop;

  always_comb begin
    x_out = '0;
    unique case (state)
      P_CADDR: begin
        x_out.kind  = XK_ADDR;
        x_out.we    = hdr.we;
        x_out.bmask = hdr.bmask;
        x_out.data  = 32'(cur);
      end
      P_CLEN: begin
        x_out.kind = XK_LEN;
        x_out.data = 32'(piece);
      end
      P_DATA: if (hdr.we && sent != piece && !f_empty && f_out.kind == UP_WDATA) begin
        x_out.kind = XK_WDATA;
        x_out.data = f_out.data;
      end
      default: ;
    endcase
  end

  assign x_req  = (state == P_REQ) || (state == P_CADDR) || (state == P_CLEN) || (state == P_DATA);
  assign x_dest = cur[SEG_BITS+2:SEG_BITS];

  logic cmd_done;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= P_HDR;
      hdr      <= '0;
      src      <= '0;
      row_base <= '0;
      stride   <= '0;
      nx <= '0; ny <= '0; col <= '0; row <= '0; piece <= '0; sent <= '0;
      pieces   <= '0;
      dn       <= '0;
    end else begin
      cmd_done = 1'b0;
      unique case (state)
        P_HDR: if (f_pop) begin
          hdr   <= hdr_t'(f_out.data);
          src   <= f_out.src;
          state <= P_ADDR;
        end
        P_ADDR: if (f_pop) begin
          row_base <= f_out.data[ADDR_W-1:0];
          state    <= P_STRIDE;
        end
        P_STRIDE: if (f_pop) begin
          stride <= f_out.data[ADDR_W-1:0];
          unique case (hdr.mode)
            MODE_SCALAR: begin nx <= 1;           ny <= 1;           end
            MODE_ROW:    begin nx <= hdr.count_x; ny <= 1;           end
            MODE_COLUMN: begin nx <= 1;           ny <= hdr.count_y; end
            default:     begin nx <= hdr.count_x; ny <= hdr.count_y; end
          endcase
          col   <= '0;
          row   <= '0;
          state <= P_PLAN;
        end
        P_PLAN: begin
          if (nx == 0 || ny == 0) begin
            cmd_done = 1'b1;
            state    <= P_HDR;
          end else begin
            piece <= piece_len(cur, nx - col);
            state <= P_REQ;
          end
        end
        P_REQ:   if (x_grant) state <= P_CADDR;
        P_CADDR: if (x_in.ready) state <= P_CLEN;
        P_CLEN:  if (x_in.ready) begin
          state  <= P_DATA;
          sent   <= '0;
          pieces <= pieces + 1'b1;
        end
        P_DATA: if (wpop) begin
          sent <= sent + 1'b1;
        end else if (x_in.done) begin
          // piece finished: release the path (x_req drops in P_PLAN/P_HDR)
          if (col + piece == nx) begin
            col <= '0;
            if (row + 1'b1 == ny) begin
              cmd_done = 1'b1;
              state    <= P_HDR;
            end else begin
              row      <= row + 1'b1;
              row_base <= row_base + stride;
              state    <= P_PLAN;
            end
          end else begin
            col   <= col + piece;
            state <= P_PLAN;
          end
        end
        default: state <= P_HDR;
      endcase

      dn        <= '0;
      dn.ready  <= (f_count + ($clog2(FIFO_DEPTH+1))'(SLACK)) <= ($clog2(FIFO_DEPTH+1))'(FIFO_DEPTH);
      dn.src    <= src;
      if (state == P_DATA && !hdr.we && x_in.rvalid) begin
        dn.rvalid <= 1'b1;
        dn.data   <= x_in.data;
      end
      dn.done   <= cmd_done;
    end
  end

  a_no_fifo_overflow: assert property (@(posedge clk) disable iff (rst) !(up.kind != UP_IDLE && f_full));
endmodule
