// sha_hash_unit: one complete hash unit behind the common 16-bit interface.
//
// Chains the input unit (header parsing and block loading), the core of the
// algorithm chosen by ALG, and the output unit (digest serialisation):
//
//   din/src_ready/src_read -> sha_in_unit -> <core> -> sha_out_unit -> dout/dst_ready/dst_write
//
// The input unit loads the next block while the core is still working on
// the previous one, because it keeps the block in its own register; a block
// is handed over only when the core is idle.
module sha_hash_unit
  import sha_if_pkg::*;
#(
  parameter alg_t ALG = ALG_BLAKE256
) (
  input  logic  clk,
  input  logic  rst,
  input  word_t din,
  input  logic  src_ready,
  output logic  src_read,
  output word_t dout,
  input  logic  dst_ready,
  output logic  dst_write
);
  localparam int unsigned BB = block_bits(ALG);

  logic [BB-1:0] blk_data;
  blk_info_t     blk_info;
  logic          blk_valid, blk_ready;
  digest_t       digest;
  logic          dig_valid, dig_ready;

  sha_in_unit #(.BLOCK_BITS(BB)) u_in (
    .clk, .rst, .din, .src_ready, .src_read,
    .blk_data, .blk_info, .blk_valid, .blk_ready);

  generate
    case (ALG)
      ALG_BLAKE256: begin : g_core
        blake256_core u_core (.clk, .rst, .blk_data, .blk_info, .blk_valid, .blk_ready,
                              .digest, .dig_valid, .dig_ready);
      end
      ALG_GROESTL256: begin : g_core
        groestl256_core u_core (.clk, .rst, .blk_data, .blk_info, .blk_valid, .blk_ready,
                                .digest, .dig_valid, .dig_ready);
      end
      ALG_JH256: begin : g_core
        jh256_core u_core (.clk, .rst, .blk_data, .blk_info, .blk_valid, .blk_ready,
                           .digest, .dig_valid, .dig_ready);
      end
      ALG_KECCAK256: begin : g_core
        keccak_core #(.RATE(BB)) u_core (.clk, .rst, .blk_data, .blk_info, .blk_valid, .blk_ready,
                                         .digest, .dig_valid, .dig_ready);
      end
      default: begin : g_core
        skein512_core u_core (.clk, .rst, .blk_data, .blk_info, .blk_valid, .blk_ready,
                              .digest, .dig_valid, .dig_ready);
      end
    endcase
  endgenerate

  sha_out_unit u_out (
    .clk, .rst, .digest, .dig_valid, .dig_ready, .dout, .dst_ready, .dst_write);
endmodule
