// keccak_core: Keccak[r = 1088, c = 512] sponge with a 256-bit output, on a
// 64-bit lane-serial datapath.
//
// The 1600-bit state is held as 25 64-bit lanes a[x + 5y] in a lane memory,
// with a second lane memory b for the result of rho and pi.  A block from the
// input unit (big-endian byte string, byte 0 at the top) is XORed into the
// first 17 lanes in the accept cycle, byte 8i being the least significant
// byte of lane i; the first block of a message XORs into a zero state.
// Each of the 24 rounds of Keccak-f[1600] then runs in three passes over the
// 25 lanes, one lane per clock cycle:
//   PAR   : column parities c[x] ^= a[x + 5y]                       (theta, part 1)
//   RHOPI : b[y + 5((2x + 3y) mod 5)] = rotl(a[x + 5y] ^ d[x], rho(x, y)),
//           d[x] = c[x-1] ^ rotl(c[x+1], 1)                         (theta, rho, pi)
//   CHI   : a[i] = b[i] ^ (~b[x+1, y] & b[x+2, y]), iota on lane 0   (chi, iota)
// The fixed rotations of rho thus become one variable 64-bit rotator, and
// chi one lane-wide unit.  After the last block the first four lanes, taken
// as little-endian bytes, form the digest.
//
// The core pads nothing: the message arrives padded, so the same core
// computes the original Keccak-256 (pad byte 0x01) and SHA3-256 (pad 0x06).
//
// Timing: blk_ready while idle; the block is absorbed in the accept cycle,
// then 24 rounds of 3 x 25 cycles, 1800 cycles; dig_valid then stays high
// until dig_ready.  The lane memories are register arrays here, not Block
// RAM, and chi reads three lanes of b per cycle, so the schedule is shorter
// than that of a Block-RAM datapath with two ports.
module keccak_core
  import sha_if_pkg::*;
  import keccak_pkg::*;
#(
  parameter int unsigned RATE = 1088
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [RATE-1:0] blk_data,
  input  blk_info_t       blk_info,
  input  logic            blk_valid,
  output logic            blk_ready,
  output digest_t         digest,
  output logic            dig_valid,
  input  logic            dig_ready
);
  localparam int unsigned LANES = RATE / 64;

  typedef logic [63:0] lane_t;

  typedef enum logic [2:0] {S_IDLE, S_PAR, S_RHOPI, S_CHI, S_DONE} fsm_t;
  fsm_t        fsm;
  lane_t       a [25];
  lane_t       b [25];
  lane_t       c [5];
  logic [4:0]  idx;      // lane 0..24 of the current pass
  logic [4:0]  round;
  logic        last_q;

  function automatic lane_t bswap64(input lane_t v);
    lane_t r;
    for (int k = 0; k < 8; k++) r[8*k +: 8] = v[8*(7-k) +: 8];
    return r;
  endfunction

  // lane coordinates and per-lane constants of the current index
  logic [2:0] x, y, xm1, xp1, xp2;
  logic [4:0] pi_dst, chi1, chi2;
  logic [5:0] rot;
  lane_t      rc_now, d_x, rot_in, rot_out, chi_out;
  always_comb begin
    x      = 3'(idx % 5);
    y      = 3'(idx / 5);
    xm1    = 3'((32'(x) + 4) % 5);
    xp1    = 3'((32'(x) + 1) % 5);
    xp2    = 3'((32'(x) + 2) % 5);
    pi_dst = 5'(32'(y) + 5 * ((2 * 32'(x) + 3 * 32'(y)) % 5));
    chi1   = 5'(32'(xp1) + 5 * 32'(y));
    chi2   = 5'(32'(xp2) + 5 * 32'(y));
    rot    = '0;
    for (int i = 0; i < 25; i++) if (idx == 5'(i)) rot = 6'(rho(i % 5, i / 5));
    rc_now = '0;
    for (int r = 0; r < ROUNDS; r++) if (round == 5'(r)) rc_now = rc(r);
    d_x     = c[xm1] ^ {c[xp1][62:0], c[xp1][63]};
    rot_in  = a[idx] ^ d_x;
    rot_out = rotl64(rot_in, 32'(rot));
    chi_out = b[idx] ^ (~b[chi1] & b[chi2]) ^ ((idx == 5'd0) ? rc_now : 64'd0);
  end

  assign blk_ready = (fsm == S_IDLE);
  assign dig_valid = (fsm == S_DONE);

  always_comb
    for (int i = 0; i < 4; i++) digest[DIGEST_BITS-1-64*i -: 64] = bswap64(a[i]);

  always_ff @(posedge clk) begin
    if (rst) begin
      fsm    <= S_IDLE;
      idx    <= '0;
      round  <= '0;
      last_q <= 1'b0;
      for (int i = 0; i < 25; i++) begin a[i] <= '0; b[i] <= '0; end
      for (int i = 0; i < 5; i++) c[i] <= '0;
    end else begin
      unique case (fsm)
        S_IDLE: if (blk_valid) begin
          for (int i = 0; i < 25; i++) begin
            lane_t base;
            base = blk_info.first ? '0 : a[i];
            if (i < LANES) a[i] <= base ^ bswap64(blk_data[RATE-1-64*i -: 64]);
            else           a[i] <= base;
          end
          for (int i = 0; i < 5; i++) c[i] <= '0;
          last_q <= blk_info.last;
          round  <= '0;
          idx    <= '0;
          fsm    <= S_PAR;
        end
        S_PAR: begin
          c[x] <= c[x] ^ a[idx];
          idx  <= (idx == 5'd24) ? 5'd0 : idx + 1'b1;
          if (idx == 5'd24) fsm <= S_RHOPI;
        end
        S_RHOPI: begin
          b[pi_dst] <= rot_out;
          idx <= (idx == 5'd24) ? 5'd0 : idx + 1'b1;
          if (idx == 5'd24) fsm <= S_CHI;
        end
        S_CHI: begin
          a[idx] <= chi_out;
          idx <= (idx == 5'd24) ? 5'd0 : idx + 1'b1;
          if (idx == 5'd24) begin
            for (int i = 0; i < 5; i++) c[i] <= '0;
            round <= round + 1'b1;
            if (round == 5'(ROUNDS - 1)) fsm <= last_q ? S_DONE : S_IDLE;
            else                         fsm <= S_PAR;
          end
        end
        S_DONE: if (dig_ready) fsm <= S_IDLE;
        default: fsm <= S_IDLE;
      endcase
    end
  end
endmodule
