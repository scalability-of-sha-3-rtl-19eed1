// groestl_pkg: the byte-level building blocks of Groestl-256.
//   - SBOX: the AES S-box, generated from its definition: multiplicative
//     inverse in GF(2^8) modulo x^8 + x^4 + x^3 + x + 1 (0 maps to 0),
//     followed by the affine map b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3)
//     ^ rotl(b,4) ^ 0x63.  Entry x is SBOX[8*x +: 8].
//   - gmul: multiplication in the same field (S-box generation); xtime:
//     multiplication by 02, from which MixBytes builds its coefficients.
//   - IV: 256 as a 64-bit big-endian number in the last bytes of the
//     512-bit chain value.
package groestl_pkg;
  localparam int unsigned ROUNDS = 10;

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] r, x;
    r = '0;
    x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r = r ^ x;
      x = x[7] ? ((x << 1) ^ 8'h1B) : (x << 1);
    end
    return r;
  endfunction

  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1B : 8'h00);
  endfunction

  function automatic logic [2047:0] gen_sbox();
    logic [2047:0] t;
    for (int x = 0; x < 256; x++) begin
      logic [7:0] inv, p, b;
      // x^254 = x^-1 by square and multiply
      inv = 8'h01;
      p   = 8'(x);
      for (int e = 0; e < 8; e++) begin
        if (e != 0) inv = gmul(inv, p);
        p = gmul(p, p);
      end
      if (x == 0) inv = 8'h00;
      b = inv ^ {inv[6:0], inv[7]} ^ {inv[5:0], inv[7:6]} ^ {inv[4:0], inv[7:5]}
              ^ {inv[3:0], inv[7:4]} ^ 8'h63;
      t[8*x +: 8] = b;
    end
    return t;
  endfunction

  localparam logic [2047:0] SBOX = gen_sbox();

  localparam logic [511:0] IV = 512'h100;
endpackage
