// skein512_core: Skein-512-256, UBI chaining over Threefish-512.
//
// For each message block the core runs one UBI step: Threefish-512 encrypts
// the block under the chain value G as key and a 128-bit tweak (byte
// position, first/final flags, type "message"), and the new chain value is
// the ciphertext XOR the block.  After the last block a second UBI step of
// type "output" encrypts an all-zero block (8 counter bytes, position 8)
// under the chain value; its first 256 bits, little-endian, are the digest.
//
// Threefish-512 here computes one round, four MIX functions and the word
// permutation, per clock cycle.  A subkey is added before the first round
// and, merged into the same cycle, after every fourth round: 72 round
// cycles, 19 subkeys.  The key schedule is two rotating registers, nine key
// words (the ninth is C240 XOR the others) and three tweak words, rotated by
// one word per subkey, so subkey s = k[s..s+7] + (0,..,t[s],t[s+1],s).
//
// Timing per UBI step: 1 cycle to load key and tweak, 1 cycle for the
// first subkey, 72 round cycles and 1 cycle for the feed-forward XOR.  The
// message bytes are little-endian 64-bit words: byte 8i is the low byte of
// word i.  The chain value starts at the precomputed IV.
module skein512_core
  import sha_if_pkg::*;
  import skein_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic [511:0] blk_data,
  input  blk_info_t    blk_info,
  input  logic         blk_valid,
  output logic         blk_ready,
  output digest_t      digest,
  output logic         dig_valid,
  input  logic         dig_ready
);
  typedef logic [63:0] w64_t;
  typedef w64_t        tf_t [8];

  typedef enum logic [2:0] {S_IDLE, S_KEY, S_INJ0, S_RUN, S_FIN, S_DONE} fsm_t;
  fsm_t       fsm;
  w64_t       g    [8];   // chain value
  w64_t       kr   [9];   // rotating key words
  w64_t       tr   [3];   // rotating tweak words
  tf_t        v;          // Threefish state
  w64_t       mq   [8];   // plaintext of the current UBI step
  logic [6:0] d;          // round counter
  logic [4:0] s;          // subkey number
  logic       last_q;     // the message block was the last one
  logic       out_ph;     // current UBI step is the output step
  w64_t       t0_q, t1_q;

  function automatic w64_t bswap64(input w64_t x);
    w64_t r;
    for (int b = 0; b < 8; b++) r[8*b +: 8] = x[8*(7-b) +: 8];
    return r;
  endfunction

  function automatic tf_t tf_round(input tf_t x, input logic [2:0] rrow);
    tf_t y, o;
    for (int j = 0; j < 4; j++) begin
      w64_t a, b;
      a = x[2*j] + x[2*j+1];
      b = rotl64(x[2*j+1], R[rrow][j]) ^ a;
      y[2*j] = a;
      y[2*j+1] = b;
    end
    for (int i = 0; i < 8; i++) o[i] = y[PERM[i]];
    return o;
  endfunction

  tf_t subkey, rnd;
  always_comb begin
    for (int i = 0; i < 8; i++) subkey[i] = kr[i];
    subkey[5] = kr[5] + tr[0];
    subkey[6] = kr[6] + tr[1];
    subkey[7] = kr[7] + 64'(s);
    rnd = tf_round(v, d[2:0]);
  end

  assign blk_ready = (fsm == S_IDLE);
  assign dig_valid = (fsm == S_DONE);
  always_comb for (int i = 0; i < 4; i++) digest[DIGEST_BITS-1-64*i -: 64] = bswap64(g[i]);

  always_ff @(posedge clk) begin
    if (rst) begin
      fsm    <= S_IDLE;
      d      <= '0;
      s      <= '0;
      last_q <= 1'b0;
      out_ph <= 1'b0;
      t0_q   <= '0;
      t1_q   <= '0;
      for (int i = 0; i < 8; i++) begin g[i] <= IV[i]; v[i] <= '0; mq[i] <= '0; end
      for (int i = 0; i < 9; i++) kr[i] <= '0;
      for (int i = 0; i < 3; i++) tr[i] <= '0;
    end else begin
      unique case (fsm)
        S_IDLE: if (blk_valid) begin
          for (int i = 0; i < 8; i++) begin
            mq[i] <= bswap64(blk_data[511-64*i -: 64]);
            if (blk_info.first) g[i] <= IV[i];
          end
          t0_q   <= blk_info.bits >> 3;
          t1_q   <= {blk_info.last, blk_info.first, TYPE_MSG, 56'b0};
          last_q <= blk_info.last;
          out_ph <= 1'b0;
          fsm    <= S_KEY;
        end
        S_KEY: begin
          w64_t par;
          par = C240;
          for (int i = 0; i < 8; i++) begin kr[i] <= g[i]; par = par ^ g[i]; end
          kr[8] <= par;
          tr[0] <= t0_q;
          tr[1] <= t1_q;
          tr[2] <= t0_q ^ t1_q;
          s     <= '0;
          fsm   <= S_INJ0;
        end
        S_INJ0: begin
          for (int i = 0; i < 8; i++) v[i] <= mq[i] + subkey[i];
          for (int i = 0; i < 9; i++) kr[i] <= kr[(i+1)%9];
          for (int i = 0; i < 3; i++) tr[i] <= tr[(i+1)%3];
          s   <= 5'd1;
          d   <= '0;
          fsm <= S_RUN;
        end
        S_RUN: begin
          if (d[1:0] == 2'd3) begin
            for (int i = 0; i < 8; i++) v[i] <= rnd[i] + subkey[i];
            for (int i = 0; i < 9; i++) kr[i] <= kr[(i+1)%9];
            for (int i = 0; i < 3; i++) tr[i] <= tr[(i+1)%3];
            s <= s + 1'b1;
          end else begin
            v <= rnd;
          end
          d <= d + 1'b1;
          if (d == 7'(ROUNDS - 1)) fsm <= S_FIN;
        end
        S_FIN: begin
          for (int i = 0; i < 8; i++) g[i] <= v[i] ^ mq[i];
          if (last_q && !out_ph) begin
            // output UBI: 8-byte counter value 0, one block, position 8
            for (int i = 0; i < 8; i++) mq[i] <= '0;
            t0_q   <= 64'd8;
            t1_q   <= {1'b1, 1'b1, TYPE_OUT, 56'b0};
            out_ph <= 1'b1;
            fsm    <= S_KEY;
          end else begin
            fsm <= out_ph ? S_DONE : S_IDLE;
          end
        end
        S_DONE: if (dig_ready) fsm <= S_IDLE;
        default: fsm <= S_IDLE;
      endcase
    end
  end
endmodule
