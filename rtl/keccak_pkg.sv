// keccak_pkg: constants of the Keccak-f[1600] permutation, computed from
// their defining formulas rather than stored as tables.
//   - rc(i): round constant of round i, from the degree-8 LFSR
//     x^8 + x^6 + x^5 + x^4 + 1; bit 2^j - 1 of rc(i) is LFSR output 7*i + j.
//   - rho(x, y): rotation of lane (x, y); lane (1, 0) is rotated by 1 and the
//     walk (x, y) -> (y, 2x + 3y) assigns (t+1)(t+2)/2 mod 64 to step t.
package keccak_pkg;
  localparam int unsigned ROUNDS = 24;

  function automatic logic [63:0] rc(input int unsigned round);
    logic [7:0]  r;
    logic [63:0] c;
    r = 8'h01;
    c = '0;
    for (int unsigned i = 0; i <= round; i++) begin
      for (int unsigned j = 0; j < 7; j++) begin
        if (i == round && r[0]) c[(1 << j) - 1] = 1'b1;
        r = r[7] ? ((r << 1) ^ 8'h71) : (r << 1);
      end
    end
    return c;
  endfunction

  function automatic int unsigned rho(input int unsigned x, input int unsigned y);
    int unsigned cx, cy, nx;
    if (x == 0 && y == 0) return 0;
    cx = 1;
    cy = 0;
    for (int unsigned t = 0; t < 24; t++) begin
      if (cx == x && cy == y) return ((t + 1) * (t + 2) / 2) % 64;
      nx = cy;
      cy = (2 * cx + 3 * cy) % 5;
      cx = nx;
    end
    return 0;
  endfunction

  function automatic logic [63:0] rotl64(input logic [63:0] v, input int unsigned n);
    return (n == 0) ? v : ((v << n) | (v >> (64 - n)));
  endfunction
endpackage
