// sha3_finalists_top: the five lightweight SHA-3 finalist hash units side by
// side, BLAKE-256, Groestl-256, JH-256, Keccak-256 and Skein-512-256, each
// behind the same 16-bit interface.  Index i of every port array belongs to
// unit i in that order (see sha_if_pkg::alg_t).  The units share only clock
// and synchronous, active-high reset; each has its own input stream
// (din, src_ready, src_read) and output stream (dout, dst_ready, dst_write).
module sha3_finalists_top
  import sha_if_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic [4:0][W-1:0] din,
  input  logic [4:0]      src_ready,
  output logic [4:0]      src_read,
  output logic [4:0][W-1:0] dout,
  input  logic [4:0]      dst_ready,
  output logic [4:0]      dst_write
);
  localparam alg_t ALGS [5] = '{ALG_BLAKE256, ALG_GROESTL256, ALG_JH256, ALG_KECCAK256, ALG_SKEIN256};

  for (genvar i = 0; i < 5; i++) begin : g_unit
    sha_hash_unit #(.ALG(ALGS[i])) u_unit (
      .clk, .rst,
      .din(din[i]), .src_ready(src_ready[i]), .src_read(src_read[i]),
      .dout(dout[i]), .dst_ready(dst_ready[i]), .dst_write(dst_write[i]));
  end
endmodule
