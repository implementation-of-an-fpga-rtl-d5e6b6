// tb_ref_pkg: reference models used by the testbenches.
//
// Straight-line software models of DES (FIPS 46), Triple-DES (EDE) and IDEA
// encryption, written bit by bit from the standards' tables rather than
// from the RTL's structure. The testbenches check these models against
// published known-answer vectors before trusting them. IDEA is modelled in
// the encryption direction only: decryption in hardware is checked by
// round trip.
package tb_ref_pkg;

  import des_pkg::IP_T, des_pkg::FP_T, des_pkg::E_T, des_pkg::P_T,
         des_pkg::PC1_T, des_pkg::PC2_T, des_pkg::SHIFT_T, des_pkg::S_T;

  // bit n of a table is bit (w - n) of a w-bit vector
  function automatic void ref_ks(input logic [63:0] key, output logic [47:0] sk [16]);
    logic [55:0] cd;
    for (int i = 0; i < 56; i++) cd[55-i] = key[64 - PC1_T[i]];
    for (int rnd = 0; rnd < 16; rnd++) begin
      for (int n = 0; n < SHIFT_T[rnd]; n++)
        cd = {cd[54:28], cd[55], cd[26:0], cd[27]};
      for (int i = 0; i < 48; i++) sk[rnd][47-i] = cd[56 - PC2_T[i]];
    end
  endfunction

  function automatic logic [31:0] ref_f(input logic [31:0] r, input logic [47:0] k);
    logic [47:0] x;
    logic [31:0] s, f;
    logic [5:0]  six;
    for (int i = 0; i < 48; i++) x[47-i] = r[32 - E_T[i]];
    x = x ^ k;
    for (int b = 0; b < 8; b++) begin
      six = x[47 - 6*b -: 6];
      s[31 - 4*b -: 4] = S_T[b][32*int'(six[5]) + 16*int'(six[0]) + int'(six[4:1])];
    end
    for (int i = 0; i < 32; i++) f[31-i] = s[32 - P_T[i]];
    return f;
  endfunction

  function automatic logic [63:0] ref_des(input logic [63:0] blk,
                                          input logic [63:0] key,
                                          input bit dec);
    logic [63:0] t;
    logic [31:0] l, r, nl;
    logic [47:0] sk [16];
    ref_ks(key, sk);
    for (int i = 0; i < 64; i++) t[63-i] = blk[64 - IP_T[i]];
    l = t[63:32];
    r = t[31:0];
    for (int rnd = 0; rnd < 16; rnd++) begin
      nl = r;
      r  = l ^ ref_f(r, sk[dec ? 15 - rnd : rnd]);
      l  = nl;
    end
    t = {r, l};
    for (int i = 0; i < 64; i++) blk[63-i] = t[64 - FP_T[i]];
    return blk;
  endfunction

  function automatic logic [63:0] ref_tdes(input logic [63:0] blk,
                                           input logic [63:0] k1,
                                           input logic [63:0] k2,
                                           input logic [63:0] k3,
                                           input bit dec);
    if (!dec) return ref_des(ref_des(ref_des(blk, k1, 0), k2, 1), k3, 0);
    else      return ref_des(ref_des(ref_des(blk, k3, 1), k2, 0), k1, 1);
  endfunction

  function automatic logic [15:0] ref_mul(input logic [15:0] a, input logic [15:0] b);
    longint unsigned x, y;
    x = (a == 0) ? 64'd65536 : 64'(a);
    y = (b == 0) ? 64'd65536 : 64'(b);
    return 16'((x * y) % 65537);
  endfunction

  function automatic logic [63:0] ref_idea(input logic [63:0] blk, input logic [127:0] key);
    logic [15:0]  z [52];
    logic [127:0] k;
    logic [15:0]  x1, x2, x3, x4, t0, t1, t2;
    k = key;
    for (int i = 0; i < 52; i++) begin
      if (i > 0 && i % 8 == 0) k = (k << 25) | (k >> 103);
      z[i] = k[127 - 16*(i%8) -: 16];
    end
    {x1, x2, x3, x4} = blk;
    for (int rnd = 0; rnd < 8; rnd++) begin
      x1 = ref_mul(x1, z[6*rnd]);
      x2 = x2 + z[6*rnd+1];
      x3 = x3 + z[6*rnd+2];
      x4 = ref_mul(x4, z[6*rnd+3]);
      t0 = ref_mul(x1 ^ x3, z[6*rnd+4]);
      t1 = ref_mul(16'(t0 + (x2 ^ x4)), z[6*rnd+5]);
      t0 = t0 + t1;
      x1 = x1 ^ t1;
      x4 = x4 ^ t0;
      t2 = x2 ^ t0;
      x2 = x3 ^ t1;
      x3 = t2;
    end
    return {ref_mul(x1, z[48]), 16'(x3 + z[49]), 16'(x2 + z[50]), ref_mul(x4, z[51])};
  endfunction

endpackage
