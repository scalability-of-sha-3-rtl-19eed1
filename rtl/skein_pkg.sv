// skein_pkg: constants of Skein-512-256 with Threefish-512.
//   - IV: the chain value after the configuration UBI for a 256-bit
//     output (schema "SHA3", version 1, output length 256, no tree); stored
//     precomputed.
//   - R: the eight rows of MIX rotation constants; round d uses R[d mod 8].
//   - PERM: word permutation applied after every round: v'[i] = v[PERM[i]].
//   - C240: key schedule parity constant.
//   - Tweak type codes for message and output UBI.
package skein_pkg;
  localparam int unsigned ROUNDS = 72;

  localparam logic [63:0] IV [8] = '{
    64'hccd044a12fdb3e13, 64'he83590301a79a9eb, 64'h55aea0614f816e6f, 64'h2a2767a4ae9b94db,
    64'hec06025e74dd7683, 64'he7a436cdc4746251, 64'hc36fbaf9393ad185, 64'h3eedba1833edfc13};

  localparam logic [5:0] R [8][4] = '{
    '{6'd46, 6'd36, 6'd19, 6'd37}, '{6'd33, 6'd27, 6'd14, 6'd42},
    '{6'd17, 6'd49, 6'd36, 6'd39}, '{6'd44, 6'd9,  6'd54, 6'd56},
    '{6'd39, 6'd30, 6'd34, 6'd24}, '{6'd13, 6'd50, 6'd10, 6'd17},
    '{6'd25, 6'd29, 6'd39, 6'd43}, '{6'd8,  6'd35, 6'd56, 6'd22}};

  localparam int unsigned PERM [8] = '{2, 1, 4, 7, 6, 5, 0, 3};

  localparam logic [63:0] C240 = 64'h1BD11BDAA9FC1A22;

  localparam logic [5:0] TYPE_MSG = 6'd48;
  localparam logic [5:0] TYPE_OUT = 6'd63;

  function automatic logic [63:0] rotl64(input logic [63:0] v, input logic [5:0] n);
    return (n == 0) ? v : ((v << n) | (v >> (7'd64 - 7'(n))));
  endfunction
endpackage
