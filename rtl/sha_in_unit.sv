// sha_in_unit: input side of the common hash interface.
//
// Reads 16-bit words from a source (din / src_ready / src_read) that carries a
// message as one or more segments.  Each segment starts with a 32-bit header
// {seq_len_ap[30:0], last} sent high half first, where seq_len_ap is the
// segment length after padding in 32-bit words.  The header of the last
// segment is followed by a 32-bit seq_len_bp, the segment's length before
// padding in bits; then the segment's data follow.  The message arrives
// already padded.
//
// Data words are shifted into a BLOCK_BITS-wide register, first word at the
// top, so the block is the big-endian byte string of the message block.  A
// full block is offered to the core with blk_valid/blk_ready; while it waits
// no further word is read, so loading and processing do not overlap.  Loading
// a block takes BLOCK_BITS/16 clock cycles when the source never stalls
// (32 cycles for 512-bit blocks, 68 for Keccak's 1088-bit blocks).
//
// blk_info.bits is the number of message bits before padding up to the end of
// the block, which BLAKE's counter and Skein's position field need.
// Segments are assumed to hold a whole number of blocks.
module sha_in_unit
  import sha_if_pkg::*;
#(
  parameter int unsigned BLOCK_BITS = 512
) (
  input  logic                  clk,
  input  logic                  rst,
  // source side
  input  word_t                 din,
  input  logic                  src_ready,   // a word is available on din
  output logic                  src_read,    // the word on din is taken this cycle
  // core side
  output logic [BLOCK_BITS-1:0] blk_data,
  output blk_info_t             blk_info,
  output logic                  blk_valid,
  input  logic                  blk_ready
);
  localparam int unsigned WORDS = BLOCK_BITS / W;

  typedef enum logic [2:0] {S_HDR_HI, S_HDR_LO, S_BP_HI, S_BP_LO, S_DATA, S_HOLD} state_t;
  state_t state;

  logic [W-1:0]                 hi_q;        // upper half of a header being read
  logic [31:0]                  seg_words;   // 16-bit words left in the segment
  logic                         seg_last;    // current segment is the last one
  msglen_t                      seg_bp;      // bits before padding in the last segment
  msglen_t                      seg_off;     // bits of the segment already loaded
  msglen_t                      done_bits;   // message bits of completed segments
  logic                         first_pend;  // next block is the message's first
  logic [$clog2(WORDS+1)-1:0]   wcnt;        // words in the current block

  logic take;
  assign src_read = take;
  always_comb begin
    take = 1'b0;
    if (src_ready && state != S_HOLD) take = 1'b1;
  end

  assign blk_valid = (state == S_HOLD);

  // Message bits of the current segment that fall into the block just loaded.
  msglen_t blk_end_off, seg_bits_to_end;
  always_comb begin
    blk_end_off     = seg_off + msglen_t'(BLOCK_BITS);
    seg_bits_to_end = seg_last ? ((blk_end_off < seg_bp) ? blk_end_off : seg_bp) : blk_end_off;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_HDR_HI;
      hi_q       <= '0;
      seg_words  <= '0;
      seg_last   <= 1'b0;
      seg_bp     <= '0;
      seg_off    <= '0;
      done_bits  <= '0;
      first_pend <= 1'b1;
      wcnt       <= '0;
      blk_data   <= '0;
      blk_info   <= '0;
    end else begin
      unique case (state)
        S_HDR_HI: if (take) begin
          hi_q  <= din;
          state <= S_HDR_LO;
        end
        S_HDR_LO: if (take) begin
          seg_words <= {hi_q, din[W-1:1], 1'b0};   // 32-bit words -> 16-bit words
          seg_last  <= din[0];
          seg_off   <= '0;
          wcnt      <= '0;
          state     <= din[0] ? S_BP_HI : S_DATA;
        end
        S_BP_HI: if (take) begin
          hi_q  <= din;
          state <= S_BP_LO;
        end
        S_BP_LO: if (take) begin
          seg_bp <= msglen_t'({hi_q, din});
          state  <= S_DATA;
        end
        S_DATA: if (take) begin
          blk_data  <= {blk_data[BLOCK_BITS-W-1:0], din};
          seg_words <= seg_words - 32'd1;
          if (wcnt == ($clog2(WORDS+1))'(WORDS - 1)) begin
            wcnt           <= '0;
            blk_info.first <= first_pend;
            blk_info.last  <= seg_last && (seg_words == 32'd1);
            blk_info.empty <= seg_last && (seg_off >= seg_bp);
            blk_info.bits  <= done_bits + seg_bits_to_end;
            first_pend     <= 1'b0;
            seg_off        <= blk_end_off;
            state          <= S_HOLD;
          end else begin
            wcnt <= wcnt + 1'b1;
          end
        end
        S_HOLD: if (blk_ready) begin
          if (seg_words == 32'd0) begin
            done_bits <= seg_last ? '0 : done_bits + seg_off;
            if (seg_last) first_pend <= 1'b1;
            state <= S_HDR_HI;
          end else begin
            state <= S_DATA;
          end
        end
        default: state <= S_HDR_HI;
      endcase
    end
  end

  // A segment must end on a block boundary.
  a_seg_whole_blocks: assert property (@(posedge clk) disable iff (rst)
    (state == S_DATA && take && seg_words == 32'd1) |-> (wcnt == ($clog2(WORDS+1))'(WORDS - 1)));
endmodule
