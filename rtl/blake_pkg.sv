// blake_pkg: constants of BLAKE-256.
//   IV      : the SHA-256 initial value.
//   C       : the sixteen 32-bit constants (leading hexadecimal digits of pi).
//   SIGMA   : the ten message-word permutations; round r uses SIGMA[r mod 10].
// The salt is all zero in this design, so it does not appear.
package blake_pkg;
  localparam int unsigned ROUNDS = 14;

  localparam logic [31:0] IV [8] = '{
    32'h6A09E667, 32'hBB67AE85, 32'h3C6EF372, 32'hA54FF53A,
    32'h510E527F, 32'h9B05688C, 32'h1F83D9AB, 32'h5BE0CD19};

  localparam logic [31:0] C [16] = '{
    32'h243F6A88, 32'h85A308D3, 32'h13198A2E, 32'h03707344,
    32'hA4093822, 32'h299F31D0, 32'h082EFA98, 32'hEC4E6C89,
    32'h452821E6, 32'h38D01377, 32'hBE5466CF, 32'h34E90C6C,
    32'hC0AC29B7, 32'hC97C50DD, 32'h3F84D5B5, 32'hB5470917};

  // One permutation per 64-bit row, entry i in bits [63-4i -: 4].
  localparam logic [63:0] SIGMA [10] = '{
    64'h0123456789ABCDEF,
    64'hEA489FD61C02B753,
    64'hB8C052FDAE367194,
    64'h7931DCBE265A40F8,
    64'h905724AFE1BC683D,
    64'h2C6A0B834D75FE19,
    64'hC51FED4A0763928B,
    64'hDB7EC13950F4862A,
    64'h6FE9B308C2D714A5,
    64'hA2847615FB9E3CD0};

  function automatic logic [3:0] sigma(input int unsigned r, input int unsigned i);
    return SIGMA[r % 10][63 - 4*i -: 4];
  endfunction

  function automatic logic [31:0] rotr32(input logic [31:0] v, input int unsigned n);
    return (v >> n) | (v << (32 - n));
  endfunction
endpackage
