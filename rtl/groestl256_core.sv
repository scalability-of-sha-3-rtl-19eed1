// groestl256_core: Groestl-256 compression and output transformation.
//
// The 512-bit chain value h and the two permutation states are 8x8 byte
// matrices filled column by column: byte k of a block is row k mod 8,
// column k div 8.  For each message block m the core runs
//   h <- P(h ^ m) ^ Q(m) ^ h
// with P and Q evaluated side by side, one round of each per clock cycle
// (AddRoundConstant, SubBytes, ShiftBytes, MixBytes), ten rounds.  After the
// last block the output transformation P(h) ^ h reuses the P round logic for
// ten more cycles, and the last 256 bits are the digest.
//
// Round constants (round r, column j): P XORs (j << 4) ^ r into row 0; Q
// XORs 0xFF into every byte and additionally (j << 4) ^ r into row 7.
// ShiftBytes rotates row i left by i (P) or by 1, 3, 5, 7, 0, 2, 4, 6 (Q).
//
// Timing: blk_ready while idle; accept cycle, 10 round cycles, 1 cycle for
// the chain update; after the last block 10 output cycles and 1 cycle to
// form the digest, then dig_valid until dig_ready.  The folded, Block-RAM
// based column-serial datapath that gives the much smaller area is not
// reproduced here.
module groestl256_core
  import sha_if_pkg::*;
  import groestl_pkg::*;
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
  typedef logic [511:0] gstate_t;   // byte k in bits [511-8k -: 8]

  typedef enum logic [2:0] {S_IDLE, S_RUN, S_CHAIN, S_OUT, S_OUTFIN, S_DONE} fsm_t;
  fsm_t       fsm;
  gstate_t    h, p, q;
  logic [3:0] round;
  logic       last_q;

  function automatic logic [7:0] gbyte(input gstate_t s, input int unsigned row, input int unsigned col);
    return s[511 - 8*(8*col + row) -: 8];
  endfunction

  function automatic gstate_t perm_round(input gstate_t s, input logic [3:0] r, input bit is_q);
    logic [7:0] a [8][8];
    logic [7:0] t [8][8];
    gstate_t    o;
    int unsigned sh;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) a[i][j] = gbyte(s, i, j);
    // AddRoundConstant
    for (int j = 0; j < 8; j++) begin
      if (is_q) begin
        for (int i = 0; i < 8; i++) a[i][j] = a[i][j] ^ 8'hFF;
        a[7][j] = a[7][j] ^ {4'(j), r};
      end else begin
        a[0][j] = a[0][j] ^ {4'(j), r};
      end
    end
    // SubBytes and ShiftBytes
    for (int i = 0; i < 8; i++) begin
      if (is_q) sh = (i < 4) ? 2*i + 1 : 2*(i - 4);
      else      sh = i;
      for (int j = 0; j < 8; j++) t[i][j] = SBOX[8*a[i][(j + sh) % 8] +: 8];
    end
    // MixBytes: multiples 2x and 4x by xtime, then 3 = 2+1, 5 = 4+1, 7 = 4+2+1
    for (int j = 0; j < 8; j++) begin
      logic [7:0] m1 [8];
      logic [7:0] m2 [8];
      logic [7:0] m4 [8];
      for (int k = 0; k < 8; k++) begin
        m1[k] = t[k][j];
        m2[k] = xtime(m1[k]);
        m4[k] = xtime(m2[k]);
      end
      for (int i = 0; i < 8; i++)
        o[511 - 8*(8*j + i) -: 8] =
            m2[i]                               // coefficient 02
          ^ m2[(i+1)%8]                         // 02
          ^ m2[(i+2)%8] ^ m1[(i+2)%8]           // 03
          ^ m4[(i+3)%8]                         // 04
          ^ m4[(i+4)%8] ^ m1[(i+4)%8]           // 05
          ^ m2[(i+5)%8] ^ m1[(i+5)%8]           // 03
          ^ m4[(i+6)%8] ^ m1[(i+6)%8]           // 05
          ^ m4[(i+7)%8] ^ m2[(i+7)%8] ^ m1[(i+7)%8];  // 07
    end
    return o;
  endfunction

  gstate_t p_next, q_next;
  assign p_next = perm_round(p, round, 1'b0);
  assign q_next = perm_round(q, round, 1'b1);

  assign blk_ready = (fsm == S_IDLE);
  assign dig_valid = (fsm == S_DONE);

  always_ff @(posedge clk) begin
    if (rst) begin
      fsm    <= S_IDLE;
      h      <= IV;
      p      <= '0;
      q      <= '0;
      round  <= '0;
      last_q <= 1'b0;
      digest <= '0;
    end else begin
      unique case (fsm)
        S_IDLE: if (blk_valid) begin
          h      <= blk_info.first ? IV : h;
          p      <= (blk_info.first ? IV : h) ^ blk_data;
          q      <= blk_data;
          last_q <= blk_info.last;
          round  <= '0;
          fsm    <= S_RUN;
        end
        S_RUN: begin
          p     <= p_next;
          q     <= q_next;
          round <= round + 1'b1;
          if (round == 4'(ROUNDS - 1)) fsm <= S_CHAIN;
        end
        S_CHAIN: begin
          h     <= h ^ p ^ q;
          p     <= h ^ p ^ q;
          round <= '0;
          fsm   <= last_q ? S_OUT : S_IDLE;
        end
        S_OUT: begin
          p     <= p_next;
          round <= round + 1'b1;
          if (round == 4'(ROUNDS - 1)) fsm <= S_OUTFIN;
        end
        S_OUTFIN: begin
          digest <= p[255:0] ^ h[255:0];
          fsm    <= S_DONE;
        end
        S_DONE: if (dig_ready) fsm <= S_IDLE;
        default: fsm <= S_IDLE;
      endcase
    end
  end
endmodule
