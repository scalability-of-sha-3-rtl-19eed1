// sha_if_pkg: widths shared by the five hash units and their common I/O.
//
// Every hash unit talks to the outside through the same narrow interface:
// a W-bit input word stream carrying segment headers and message data, and a
// W-bit output word stream carrying the 256-bit digest.  W = 16 follows the
// design; the 32-bit header layout is this implementation's choice.
package sha_if_pkg;
  localparam int unsigned W           = 16;   // external data bus width
  localparam int unsigned DIGEST_BITS = 256;  // every unit produces a 256-bit digest
  localparam int unsigned LEN_BITS    = 64;   // message bit counter width

  typedef logic [W-1:0]           word_t;
  typedef logic [DIGEST_BITS-1:0] digest_t;
  typedef logic [LEN_BITS-1:0]    msglen_t;

  // The five hash algorithms a hash unit can be built for.
  typedef enum logic [2:0] {ALG_BLAKE256, ALG_GROESTL256, ALG_JH256, ALG_KECCAK256, ALG_SKEIN256} alg_t;

  // Message block size of each algorithm in bits.
  function automatic int unsigned block_bits(input alg_t a);
    return (a == ALG_KECCAK256) ? 1088 : 512;
  endfunction

  // Attributes of one message block handed from the input unit to a core.
  typedef struct packed {
    logic    first;   // first block of the message
    logic    last;    // last block of the message (finalise after it)
    logic    empty;   // block holds padding only, no message bit
    msglen_t bits;    // message bits (before padding) up to the end of this block
  } blk_info_t;
endpackage
