// sha_out_unit: output side of the common hash interface.
//
// Takes a 256-bit digest from a core (dig_valid/dig_ready) and sends it as
// sixteen 16-bit words on dout, most significant word first, writing one
// word per cycle in which the destination has room (dst_ready).  dst_write
// marks each valid word.  The next digest is accepted in the cycle after the
// last word went out, so a full digest takes 16 cycles when the destination
// never stalls.
module sha_out_unit
  import sha_if_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  digest_t digest,
  input  logic    dig_valid,
  output logic    dig_ready,
  output word_t   dout,
  input  logic    dst_ready,
  output logic    dst_write
);
  localparam int unsigned NW = DIGEST_BITS / W;

  digest_t                 sr;
  logic [$clog2(NW+1)-1:0] left;   // words still to send

  assign dig_ready = (left == '0);
  assign dout      = sr[DIGEST_BITS-1 -: W];
  assign dst_write = (left != '0) && dst_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      sr   <= '0;
      left <= '0;
    end else if (left == '0) begin
      if (dig_valid) begin
        sr   <= digest;
        left <= ($clog2(NW+1))'(NW);
      end
    end else if (dst_ready) begin
      sr   <= sr << W;
      left <= left - 1'b1;
    end
  end
endmodule
