// edes_ref_pkg: behavioural reference model of the EDES cipher for the testbenches.
//
// It is written from the algorithm, not from the RTL structure: bit-serial table look-ups in
// DES numbering (bit 1 = leftmost), the key schedule as a list of sixteen sub-key pairs, and
// the round equations of the cipher applied directly:
//   encrypt: A_i = B_{i-1}, B_i = C_{i-1} ^ f2(B_{i-1}, K2_i), C_i = A_{i-1} ^ f1(B_{i-1}, K1_i),
//            ciphertext = IP^-1(B16, A16, C16)
//   decrypt: the same round with K1_{17-i}/K2_{17-i} and the f1/f2 roles swapped.
// The E table is spelled out here instead of using the RTL's formula. The DES P, PC-1, PC-2,
// shift and S tables come from edes_pkg; they are checked against published DES values by
// the unit testbenches.
package edes_ref_pkg;
  import edes_pkg::*;

  typedef logic [47:0] subkey_t;
  typedef subkey_t     sched_t [16];

  localparam int E_REF [48] = '{
    32,  1,  2,  3,  4,  5,  4,  5,  6,  7,  8,  9,
     8,  9, 10, 11, 12, 13, 12, 13, 14, 15, 16, 17,
    16, 17, 18, 19, 20, 21, 20, 21, 22, 23, 24, 25,
    24, 25, 26, 27, 28, 29, 28, 29, 30, 31, 32,  1};

  // Bit k (1-based from the left) of an n-bit value.
  function automatic logic bit_at(input logic [127:0] v, input int n, input int k);
    return v[n - k];
  endfunction

  function automatic logic [47:0] ref_e(input logic [31:0] r);
    logic [47:0] o;
    for (int j = 0; j < 48; j++) o[47 - j] = bit_at(128'(r), 32, E_REF[j]);
    return o;
  endfunction

  function automatic logic [31:0] ref_p(input logic [31:0] s);
    logic [31:0] o;
    for (int j = 0; j < 32; j++) o[31 - j] = bit_at(128'(s), 32, P_TAB[j]);
    return o;
  endfunction

  function automatic logic [3:0] ref_s(input int table_no, input logic [5:0] x);
    int row, col;
    row = 2 * int'(x[5]) + int'(x[0]);
    col = int'(x[4:1]);
    return S_TAB[table_no][16 * row + col];
  endfunction

  // f: expansion, key XOR, eight S-boxes, P. S-boxes 1-8 and 9-16 use the same tables, so
  // f1 and f2 differ only in the sub-key they are given.
  function automatic logic [31:0] ref_f(input logic [31:0] r, input logic [47:0] k);
    logic [47:0] x;
    logic [31:0] s;
    x = ref_e(r) ^ k;
    for (int i = 0; i < 8; i++) s[31 - 4*i -: 4] = ref_s(i, x[47 - 6*i -: 6]);
    return ref_p(s);
  endfunction

  function automatic logic [55:0] ref_pc1(input logic [63:0] k);
    logic [55:0] o;
    for (int j = 0; j < 56; j++) o[55 - j] = bit_at(128'(k), 64, PC1_TAB[j]);
    return o;
  endfunction

  function automatic logic [47:0] ref_pc2(input logic [55:0] cd);
    logic [47:0] o;
    for (int j = 0; j < 48; j++) o[47 - j] = bit_at(128'(cd), 56, PC2_TAB[j]);
    return o;
  endfunction

  function automatic logic [27:0] rotl(input logic [27:0] v, input int n);
    logic [27:0] o;
    o = v;
    repeat (n) o = {o[26:0], o[27]};
    return o;
  endfunction

  // DES sub-keys K_1..K_16 (index 0..15) of one 64-bit key.
  function automatic sched_t ref_schedule(input logic [63:0] key);
    sched_t ks;
    logic [55:0] cd;
    logic [27:0] c, d;
    cd = ref_pc1(key);
    c  = cd[55:28];
    d  = cd[27:0];
    for (int i = 0; i < 16; i++) begin
      c = rotl(c, SHIFTS[i]);
      d = rotl(d, SHIFTS[i]);
      ks[i] = ref_pc2({c, d});
    end
    return ks;
  endfunction

  // 96-bit initial permutation built by its construction rule: even bit positions 2,4,6,8
  // then odd positions 1,3,5,7, each gathered from byte 12 down to byte 1.
  function automatic logic [95:0] ref_ip(input logic [95:0] d);
    logic [95:0] o;
    int n;
    int order [8] = '{2, 4, 6, 8, 1, 3, 5, 7};
    n = 1;
    foreach (order[p]) begin
      for (int by = 12; by >= 1; by--) begin
        o[96 - n] = d[96 - ((by - 1) * 8 + order[p])];
        n++;
      end
    end
    return o;
  endfunction

  function automatic logic [95:0] ref_ip_inv(input logic [95:0] d);
    logic [95:0] o;
    // Invert by search: find, for every output position, which input position maps there.
    for (int src = 0; src < 96; src++) begin
      logic [95:0] one, img;
      one = 96'(1) << src;
      img = ref_ip(one);
      for (int k = 0; k < 96; k++) if (img[k]) o[src] = d[k];
    end
    return o;
  endfunction

  function automatic logic [95:0] ref_encrypt(input logic [95:0] pt, input logic [127:0] key);
    sched_t k1s, k2s;
    logic [31:0] a, b, c, na, nb, nc;
    logic [95:0] x;
    k1s = ref_schedule(key[127:64]);
    k2s = ref_schedule(key[63:0]);
    x = ref_ip(pt);
    {a, b, c} = x;
    for (int i = 0; i < 16; i++) begin
      na = b;
      nb = c ^ ref_f(b, k2s[i]);
      nc = a ^ ref_f(b, k1s[i]);
      a = na; b = nb; c = nc;
    end
    return ref_ip_inv({b, a, c});
  endfunction

  function automatic logic [95:0] ref_decrypt(input logic [95:0] ct, input logic [127:0] key);
    sched_t k1s, k2s;
    logic [31:0] a, b, c, na, nb, nc;
    logic [95:0] x;
    k1s = ref_schedule(key[127:64]);
    k2s = ref_schedule(key[63:0]);
    x = ref_ip(ct);
    {a, b, c} = x;
    for (int i = 15; i >= 0; i--) begin
      na = b;
      nb = c ^ ref_f(b, k1s[i]);
      nc = a ^ ref_f(b, k2s[i]);
      a = na; b = nb; c = nc;
    end
    return ref_ip_inv({b, a, c});
  endfunction

  // Give every byte of a 128-bit key odd parity (parity bit = LSB of the byte).
  function automatic logic [127:0] odd_parity(input logic [127:0] k);
    logic [127:0] o;
    o = k;
    for (int i = 0; i < 16; i++) o[8*i] = ~(^o[8*i+1 +: 7]);
    return o;
  endfunction
endpackage
