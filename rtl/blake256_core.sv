// blake256_core: BLAKE-256 compression function with chaining, folded onto
// one half-G unit.
//
// The 16-word working state v is initialised from the chain value h, the
// constants and the 64-bit counter t (message bits up to the end of the
// block; zero for a block that holds only padding).  Fourteen rounds follow,
// each a column step and a diagonal step of four G functions.  As in the
// lightweight BLAKE datapath, G is split into two halves that share one
// 32-bit unit:
//   half 0: a += b + (m[s0] ^ C[s1]);  d = (d ^ a) >>> 16;  c += d;  b = (b ^ c) >>> 12;
//   half 1: a += b + (m[s1] ^ C[s0]);  d = (d ^ a) >>> 8;   c += d;  b = (b ^ c) >>> 7;
// with (s0, s1) = (SIGMA_r[2g], SIGMA_r[2g+1]).  One half-G is computed per
// clock cycle, reading and writing four words of the state, which is kept
// as a register file of 16 words (distributed RAM on an FPGA).  The
// sequence G0..G7 of every round, each as half 0 then half 1, takes 16
// cycles, 224 for the 14 rounds.  One more cycle folds v back into the chain
// value, h_i ^= v_i ^ v_(i+8); the salt is zero.  After the last block h is
// the digest (big-endian words).
//
// Timing: blk_ready while idle; the state is initialised in the accept
// cycle, then 224 half-G cycles and 1 finalisation cycle; dig_valid after the
// last block stays high until dig_ready.  Unlike the lightweight unit, the
// half-G unit is not pipelined, the message and constants sit in registers
// and a constant table rather than in Block RAM, and no second G is
// interleaved, so the controller is a plain counter.
module blake256_core
  import sha_if_pkg::*;
  import blake_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [511:0] blk_data,
  input  blk_info_t  blk_info,
  input  logic       blk_valid,
  output logic       blk_ready,
  output digest_t    digest,
  output logic       dig_valid,
  input  logic       dig_ready
);
  typedef logic [31:0] word32_t;
  typedef word32_t     vstate_t [16];

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FIN, S_DONE} fsm_t;
  fsm_t       fsm;
  word32_t    h [8];
  vstate_t    v;
  word32_t    m [16];
  logic [3:0] round;    // 0..13
  logic [2:0] gi;       // G function 0..7 within the round (4..7 diagonals)
  logic       half;     // which half of G
  logic       last_q;

  // Indices of a, b, c, d for G number g (0..3 columns, 4..7 diagonals).
  function automatic int unsigned gidx(input int unsigned g, input int unsigned k);
    int unsigned col;
    col = g % 4;
    if (g < 4) return col + 4*k;
    return 4*k + ((col + k) % 4);
  endfunction

  // Half-G datapath
  logic [3:0] ia, ib, ic, id, s0, s1, smi, sci;
  word32_t    xa, xb, xc, xd, xmc;
  word32_t    ya, yb, yc, yd;
  always_comb begin
    ia  = 4'(gidx(32'(gi), 0));
    ib  = 4'(gidx(32'(gi), 1));
    ic  = 4'(gidx(32'(gi), 2));
    id  = 4'(gidx(32'(gi), 3));
    s0  = sigma(32'(round), 2*32'(gi));
    s1  = sigma(32'(round), 2*32'(gi) + 1);
    smi = half ? s1 : s0;   // message word index
    sci = half ? s0 : s1;   // constant index
    xmc = m[smi] ^ C[sci];
    xa  = v[ia];
    xb  = v[ib];
    xc  = v[ic];
    xd  = v[id];
    ya  = xa + xb + xmc;
    yd  = rotr32(xd ^ ya, half ? 8 : 16);
    yc  = xc + yd;
    yb  = rotr32(xb ^ yc, half ? 7 : 12);
  end

  assign blk_ready = (fsm == S_IDLE);
  assign dig_valid = (fsm == S_DONE);
  always_comb for (int i = 0; i < 8; i++) digest[DIGEST_BITS-1-32*i -: 32] = h[i];

  always_ff @(posedge clk) begin
    if (rst) begin
      fsm    <= S_IDLE;
      round  <= '0;
      gi     <= '0;
      half   <= 1'b0;
      last_q <= 1'b0;
      for (int i = 0; i < 8; i++)  h[i] <= IV[i];
      for (int i = 0; i < 16; i++) begin v[i] <= '0; m[i] <= '0; end
    end else begin
      unique case (fsm)
        S_IDLE: if (blk_valid) begin
          logic [63:0] t;
          t = blk_info.empty ? 64'd0 : blk_info.bits;
          for (int i = 0; i < 16; i++) m[i] <= blk_data[511-32*i -: 32];
          for (int i = 0; i < 8; i++) begin
            h[i] <= blk_info.first ? IV[i] : h[i];
            v[i] <= blk_info.first ? IV[i] : h[i];
          end
          for (int i = 0; i < 4; i++) v[8+i] <= C[i];
          v[12] <= t[31:0]  ^ C[4];
          v[13] <= t[31:0]  ^ C[5];
          v[14] <= t[63:32] ^ C[6];
          v[15] <= t[63:32] ^ C[7];
          last_q <= blk_info.last;
          round  <= '0;
          gi     <= '0;
          half   <= 1'b0;
          fsm    <= S_RUN;
        end
        S_RUN: begin
          v[ia] <= ya;
          v[ib] <= yb;
          v[ic] <= yc;
          v[id] <= yd;
          half  <= ~half;
          if (half) begin
            gi <= gi + 1'b1;
            if (gi == 3'd7) begin
              round <= round + 1'b1;
              if (round == 4'(ROUNDS - 1)) fsm <= S_FIN;
            end
          end
        end
        S_FIN: begin
          for (int i = 0; i < 8; i++) h[i] <= h[i] ^ v[i] ^ v[i+8];
          fsm <= last_q ? S_DONE : S_IDLE;
        end
        S_DONE: if (dig_ready) fsm <= S_IDLE;
        default: fsm <= S_IDLE;
      endcase
    end
  end
endmodule
