// tb_hash_pkg: test-message generator and the five padding rules, shared by
// the hash testbenches.  Message byte k of test message "seed" is
//   (37*k + 101*seed + (k >> 8)) mod 256.
// Each pad_* function returns the padded message as a byte queue, exactly
// as a host would deliver it to a hash unit.
package tb_hash_pkg;
  typedef logic [7:0] bytes_t [$];

  function automatic logic [7:0] msg_byte(input int seed, input int k);
    return 8'((37*k + 101*seed + (k >> 8)) % 256);
  endfunction

  function automatic bytes_t message(input int len, input int seed);
    bytes_t m;
    for (int k = 0; k < len; k++) m.push_back(msg_byte(seed, k));
    return m;
  endfunction

  function automatic void push_be(ref bytes_t m, input logic [127:0] v, input int nbytes);
    for (int i = nbytes - 1; i >= 0; i--) m.push_back(v[8*i +: 8]);
  endfunction

  // BLAKE-256: 1, zeros, 1, 64-bit length
  function automatic bytes_t pad_blake(input int len, input int seed);
    bytes_t m = message(len, seed);
    m.push_back(8'h80);
    while (m.size() % 64 != 56) m.push_back(8'h00);
    m[55 + 64*((m.size() - 56) / 64)] = m[55 + 64*((m.size() - 56) / 64)] | 8'h01;
    push_be(m, 128'(64'(len) * 8), 8);
    return m;
  endfunction

  // Groestl-256: 1, zeros, 64-bit number of blocks
  function automatic bytes_t pad_groestl(input int len, input int seed);
    bytes_t m = message(len, seed);
    m.push_back(8'h80);
    while (m.size() % 64 != 56) m.push_back(8'h00);
    push_be(m, 128'((m.size() + 8) / 64), 8);
    return m;
  endfunction

  // JH-256: 1, 383 + (-l mod 512) zero bits, 128-bit length
  function automatic bytes_t pad_jh(input int len, input int seed);
    bytes_t m = message(len, seed);
    int l = 8 * len;
    int z = (383 + ((512 - (l % 512)) % 512) - 7) / 8;
    m.push_back(8'h80);
    for (int i = 0; i < z; i++) m.push_back(8'h00);
    push_be(m, 128'(l), 16);
    return m;
  endfunction

  // Keccak with rate 1088: domain byte (0x01 Keccak, 0x06 SHA3), zeros, final 0x80
  function automatic bytes_t pad_keccak(input int len, input int seed, input logic [7:0] ds);
    bytes_t m = message(len, seed);
    m.push_back(ds);
    while (m.size() % 136 != 0) m.push_back(8'h00);
    m[m.size() - 1] = m[m.size() - 1] | 8'h80;
    return m;
  endfunction

  // Skein: zeros up to a whole block; the empty message is one zero block
  function automatic bytes_t pad_skein(input int len, input int seed);
    bytes_t m = message(len, seed);
    if (len == 0) m.push_back(8'h00);
    while (m.size() % 64 != 0) m.push_back(8'h00);
    return m;
  endfunction
endpackage
