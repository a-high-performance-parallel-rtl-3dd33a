// pixel_formatter: the pixel formatter unit (PFU) of a vector unit. It
// converts between the packed unsigned-integer pixels kept in shared memory
// and the IEEE-754 single-precision numbers the FPUs compute on, so the
// FPUs never spend cycles on format conversion.
//
// Commands (`start` with `mode`, `count` elements, register-file bases):
//   UNPACK8/16/32 : memory words from the input stream are split into 4 x 8-bit
//                   or 2 x 16-bit pixels (lowest bits first), each converted
//                   exactly to a float, and written to vector register file A
//                   or B (`dst_b`) at consecutive addresses. UNPACK32 copies
//                   words unchanged (data already in float form).
//   PACK8/16/32   : floats read from vector register file C are rounded to
//                   the nearest integer and clamped to the pixel range
//                   (negative values and NaN give 0, overflow gives the
//                   maximum), packed lowest pixel first, and sent out as
//                   memory words. A final partly filled word is padded
//                   with zeros. PACK32 sends words unchanged.
//   MOVE          : copies `count` words from C to A or B, so a result can
//                   be the next operand, as the document describes.
// One element is converted per cycle. The input stream has valid/ready
// (ready = the PFU takes in_word this cycle); the output stream has a valid
// strobe and is assumed never to stall (the output FIFO is sized for it).
// Register file C is read with one cycle of latency. `done` pulses at the
// end of a command.
//
// The document gives the PFU's purpose (8/16-bit unsigned pixels to and
// from floating point, and the C to A/B transfer); the rounding, clamping,
// pixel order and command set are this design's choices.
module pixel_formatter #(
  parameter int unsigned AW = 11
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [2:0]    mode,
  input  logic [AW:0]   count,
  input  logic [AW-1:0] src_base,
  input  logic [AW-1:0] dst_base,
  input  logic          dst_b,
  output logic          busy,
  output logic          done,
  // memory-side streams
  input  logic          in_valid,
  input  logic [31:0]   in_word,
  output logic          in_ready,
  output logic          out_valid,
  output logic [31:0]   out_word,
  // register files
  output logic          ab_we,
  output logic          ab_sel_b,
  output logic [AW-1:0] ab_waddr,
  output logic [31:0]   ab_wdata,
  output logic          c_re,
  output logic [AW-1:0] c_raddr,
  input  logic [31:0]   c_rdata
);
  localparam logic [2:0] UNPACK8 = 3'd0, UNPACK16 = 3'd1, UNPACK32 = 3'd2,
                         PACK8   = 3'd3, PACK16   = 3'd4, PACK32   = 3'd5,
                         MOVE    = 3'd6;

  // unsigned integer (up to 16 bits) to float, exact
  function automatic logic [31:0] u2f(input logic [15:0] v);
    int msb;
    logic [22:0] man;
    if (v == 0) return 32'h0;
    msb = 0;
    for (int k = 0; k < 16; k++) if (v[k]) msb = k;
    man = 23'(({7'b0, v} << (23 - msb)));
    return {1'b0, 8'(127 + msb), man};
  endfunction

  // float to unsigned integer of `bits` bits, round half up, clamped
  function automatic logic [15:0] f2u(input logic [31:0] f, input int bits);
    int e;
    logic [40:0] m, sh;
    logic [15:0] maxv;
    maxv = 16'((32'd1 << bits) - 1);
    if (f[31] || f[30:23] == 8'hFF && f[22:0] != 0) return 16'h0;   // negative or NaN
    e = int'(f[30:23]) - 127;
    if (e < -1) return 16'h0;
    if (e >= bits) return maxv;
    m  = {17'b0, 1'b1, f[22:0]};                 // 1.f * 2^23
    sh = (m << 17) >> (23 - e);                  // value * 2^17
    sh = sh + 41'(1 << 16);                      // + 0.5
    sh = sh >> 17;
    if (sh > 41'(maxv)) return maxv;
    return sh[15:0];
  endfunction

  logic [2:0]    md;
  logic [AW:0]   left;            // elements still to produce
  logic [AW-1:0] waddr, raddr;
  logic          dst_q;
  logic [31:0]   word;            // input word being split / output being packed
  logic [1:0]    lane;            // pixel position inside the word
  logic          have_word;
  logic          rd_pending, rd_last;  // a C read issued last cycle
  logic [AW:0]   reads_left;

  logic is_unpack, is_pack;
  assign is_unpack = (md == UNPACK8) || (md == UNPACK16) || (md == UNPACK32);
  assign is_pack   = (md == PACK8)   || (md == PACK16)   || (md == PACK32);

  function automatic logic [1:0] lanes_per_word(input logic [2:0] m);
    case (m)
      UNPACK8, PACK8:   return 2'd3;
      UNPACK16, PACK16: return 2'd1;
      default:          return 2'd0;
    endcase
  endfunction

  // unpack: take a new word when none is held or the held one is used up
  // this cycle, so pixels flow at one per cycle
  logic word_ends;
  assign word_ends = have_word && (lane == lanes_per_word(md) || left == 1);
  assign in_ready  = busy && is_unpack && left != 0 &&
                     (!have_word || (word_ends && left != 1));

  // pack / move: read C while elements remain
  assign c_re    = busy && !is_unpack && reads_left != 0;
  assign c_raddr = raddr;

  always_comb begin
    ab_we    = 1'b0;
    ab_sel_b = dst_q;
    ab_waddr = waddr;
    ab_wdata = '0;
    if (busy && is_unpack && have_word) begin
      ab_we = 1'b1;
      unique case (md)
        UNPACK8:  ab_wdata = u2f({8'b0, word[8*lane +: 8]});
        UNPACK16: ab_wdata = u2f(word[16*lane[0] +: 16]);
        default:  ab_wdata = word;
      endcase
    end else if (busy && md == MOVE && rd_pending) begin
      ab_we    = 1'b1;
      ab_wdata = c_rdata;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0; done <= 1'b0; md <= '0; left <= '0; waddr <= '0; raddr <= '0;
      dst_q <= 1'b0; word <= '0; lane <= '0; have_word <= 1'b0;
      rd_pending <= 1'b0; rd_last <= 1'b0; reads_left <= '0;
      out_valid <= 1'b0; out_word <= '0;
    end else begin
      done      <= 1'b0;
      out_valid <= 1'b0;
      if (start && !busy) begin
        busy       <= (count != 0);
        done       <= (count == 0);
        md         <= mode;
        left       <= count;
        reads_left <= count;
        waddr      <= dst_base;
        raddr      <= src_base;
        dst_q      <= dst_b;
        lane       <= '0;
        have_word  <= 1'b0;
        word       <= '0;
      end else if (busy) begin
        if (is_unpack) begin
          if (have_word) begin
            waddr <= waddr + 1'b1;
            left  <= left - 1'b1;
            if (word_ends) have_word <= 1'b0;
            lane <= lane + 1'b1;
            if (left == 1) begin busy <= 1'b0; done <= 1'b1; end
          end
          if (in_ready && in_valid) begin
            word      <= in_word;
            have_word <= 1'b1;
            lane      <= '0;
          end
        end else begin
          // issue reads of C
          rd_pending <= c_re;
          rd_last    <= c_re && reads_left == 1;
          if (c_re) begin
            raddr      <= raddr + 1'b1;
            reads_left <= reads_left - 1'b1;
          end
          // consume the word read last cycle
          if (rd_pending) begin
            if (md == MOVE) begin
              waddr <= waddr + 1'b1;
            end else if (is_pack) begin
              logic [31:0] w;
              w = word;
              unique case (md)
                PACK8:   w[8*lane +: 8]       = f2u(c_rdata, 8)[7:0];
                PACK16:  w[16*lane[0] +: 16]  = f2u(c_rdata, 16);
                default: w                    = c_rdata;
              endcase
              if (lane == lanes_per_word(md) || rd_last) begin
                out_valid <= 1'b1;
                out_word  <= w;
                word      <= '0;
                lane      <= '0;
              end else begin
                word <= w;
                lane <= lane + 1'b1;
              end
            end
            if (rd_last) begin
              busy <= 1'b0;
              done <= 1'b1;
            end
          end
        end
      end
    end
  end
endmodule
