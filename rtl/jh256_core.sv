// jh256_core: JH-256 compression function F8 with the 42-round E8.
//
// For a 512-bit block M and the 1024-bit chain value H:
//   H <- E8(H ^ (M || 0)) ^ (0 || M)
// E8 groups the state into 256 4-bit elements (element 2i takes bits i,
// i+256, i+512, i+768 of H; element 2i+1 takes the same bits of i+128),
// runs 42 rounds R8 and de-groups.  Grouping and de-grouping are pure wiring
// here.  One R8 round is computed per clock cycle.  Its 256-bit round
// constant is generated on the fly, in parallel, by the smaller round R6
// applied to the previous constant, starting from C0 at every block.  The
// initial chain value is the precomputed constant H0.  After the last block
// the last 256 bits of H are the digest.
//
// Timing: blk_ready while idle; the block is XORed and grouped in the
// accept cycle, 42 round cycles follow, then one cycle de-groups and XORs M
// into the lower half.  dig_valid after the last block stays high until
// dig_ready.  The 32-bit Block-RAM datapath that performs grouping and
// de-grouping sequentially is not reproduced.
module jh256_core
  import sha_if_pkg::*;
  import jh_pkg::*;
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
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FIN, S_DONE} fsm_t;
  fsm_t           fsm;
  logic [1023:0]  h, q;
  logic [511:0]   m;
  logic [255:0]   c;
  logic [5:0]     round;
  logic           last_q;

  logic [1023:0] h0_flat;
  assign h0_flat = {H0[0], H0[1], H0[2], H0[3]};

  function automatic logic [1023:0] group(input logic [1023:0] x);
    logic [1023:0] o;
    for (int i = 0; i < 128; i++)
      for (int k = 0; k < 4; k++) begin
        o[1023 - 4*(2*i)     - k] = x[1023 - (i + 256*k)];
        o[1023 - 4*(2*i + 1) - k] = x[1023 - (i + 128 + 256*k)];
      end
    return o;
  endfunction

  function automatic logic [1023:0] degroup(input logic [1023:0] y);
    logic [1023:0] o;
    for (int i = 0; i < 128; i++)
      for (int k = 0; k < 4; k++) begin
        o[1023 - (i + 256*k)]       = y[1023 - 4*(2*i)     - k];
        o[1023 - (i + 128 + 256*k)] = y[1023 - 4*(2*i + 1) - k];
      end
    return o;
  endfunction

  logic [1023:0] q_next, h_fin, h_in;
  logic [255:0]  c_next;
  assign q_next = jh_round(q, c, 256);
  assign c_next = jh_round({768'b0, c}, 256'b0, 64)[255:0];
  assign h_fin  = degroup(q) ^ {512'b0, m};
  assign h_in   = blk_info.first ? h0_flat : h;

  assign blk_ready = (fsm == S_IDLE);
  assign dig_valid = (fsm == S_DONE);
  assign digest    = h[255:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      fsm    <= S_IDLE;
      h      <= '0;
      q      <= '0;
      m      <= '0;
      c      <= C0;
      round  <= '0;
      last_q <= 1'b0;
    end else begin
      unique case (fsm)
        S_IDLE: if (blk_valid) begin
          q      <= group(h_in ^ {blk_data, 512'b0});
          m      <= blk_data;
          c      <= C0;
          last_q <= blk_info.last;
          round  <= '0;
          fsm    <= S_RUN;
        end
        S_RUN: begin
          q     <= q_next;
          c     <= c_next;
          round <= round + 1'b1;
          if (round == 6'(ROUNDS - 1)) fsm <= S_FIN;
        end
        S_FIN: begin
          h   <= h_fin;
          fsm <= last_q ? S_DONE : S_IDLE;
        end
        S_DONE: if (dig_ready) fsm <= S_IDLE;
        default: fsm <= S_IDLE;
      endcase
    end
  end
endmodule
