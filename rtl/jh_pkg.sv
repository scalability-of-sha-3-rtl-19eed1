// jh_pkg: constants and round function of JH-256 (42 rounds).
//   - S0, S1: the two 4-bit S-boxes; each constant bit picks one of them.
//   - C0: round constant of round 0 (the fractional part of sqrt(2));
//     constant r+1 is R6(constant r) with all S-box selectors zero.
//   - H0: the initial chain value of JH-256, H0 = F8(H(-1), 0) where H(-1)
//     holds 256 as a 16-bit number in its first two bytes.  It is stored
//     precomputed, as a 1024-bit constant.
//   - jh_round: one round R_d on 2^d 4-bit elements, element i at bits
//     [4*2^d-1-4i -: 4]: S-box layer, linear layer L on element pairs, then
//     the permutation P_d = phi_d . P'_d . pi_d.
package jh_pkg;
  localparam int unsigned ROUNDS = 42;

  localparam logic [63:0] S0 = 64'h9_0_4_B_D_C_3_F_1_A_2_6_7_5_8_E;
  localparam logic [63:0] S1 = 64'h3_C_6_D_5_7_1_9_F_2_0_4_B_A_E_8;

  localparam logic [255:0] C0 =
    256'h6a09e667f3bcc908b2fb1366ea957d3e3adec17512775099da2f590b0667322a;

  localparam logic [255:0] H0 [4] = '{
    256'heb98a3412c20d3eb92cdbe7b9cb245c11c93519160d4c7fa260082d67e508a03,
    256'ha4239e267726b945e0fb1a48d41a9477cdb5ab26026b177a56f024420fff2fa8,
    256'h71a396897f2e4d751d144908f77de262277695f776248f9487d5b6574780296c,
    256'h5c5e272dac8e0d6c518450c657057a0f7be4d367702412ea89e3ab13d31cd769};

  function automatic logic [3:0] sbox(input logic sel, input logic [3:0] x);
    return sel ? S1[63 - 4*x -: 4] : S0[63 - 4*x -: 4];
  endfunction

  // multiplication by x in GF(2^4) modulo x^4 + x + 1
  function automatic logic [3:0] mul2(input logic [3:0] a);
    return {a[2:0], 1'b0} ^ (a[3] ? 4'h3 : 4'h0);
  endfunction

  // Element-wise round on N = 2^d elements.
  function automatic logic [1023:0] jh_round(input logic [1023:0] s, input logic [255:0] c,
                                             input int unsigned n);
    logic [3:0]    v [256];
    logic [3:0]    t [256];
    logic [1023:0] o;
    o = '0;
    for (int unsigned i = 0; i < n; i++)
      v[i] = sbox(c[n - 1 - i], s[4*n - 1 - 4*i -: 4]);
    for (int unsigned i = 0; i < n; i += 2) begin
      logic [3:0] a, b;
      b = v[i+1] ^ mul2(v[i]);
      a = v[i]   ^ mul2(b);
      v[i] = a;
      v[i+1] = b;
    end
    // pi_d: swap the last two elements of every group of four
    for (int unsigned i = 0; i < n; i += 4) begin
      t[i] = v[i]; t[i+1] = v[i+1]; t[i+2] = v[i+3]; t[i+3] = v[i+2];
    end
    // P'_d: even elements to the lower half, odd elements to the upper half
    for (int unsigned i = 0; i < n / 2; i++) begin
      v[i]         = t[2*i];
      v[i + n / 2] = t[2*i + 1];
    end
    // phi_d: swap neighbours in the upper half
    for (int unsigned i = 0; i < n; i++)
      o[4*n - 1 - 4*i -: 4] = (i < n / 2) ? v[i] : v[i ^ 1];
    return o;
  endfunction
endpackage
