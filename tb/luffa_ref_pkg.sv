// Behavioural reference model of Luffa-224/256 for the testbenches.
//
// Written independently of the RTL datapath: words are held in unpacked
// arrays, the GF multiplication is done as a polynomial shift with explicit
// reduction, and the S-box is applied bit by bit. Only the data tables (IV
// and step constants) are shared with luffa_pkg. ref_hash() hashes a list of
// already padded 256-bit blocks: one round per block, the blank round, and
// the XOR of the three chunks.
package luffa_ref_pkg;

  typedef bit [31:0] w32_t;
  typedef w32_t      blk_t [8];
  typedef blk_t      st_t  [3];

  localparam bit [3:0] REF_SBOX [16] = '{13, 14, 0, 1, 5, 10, 7, 6, 11, 3, 9, 12, 15, 8, 2, 4};

  function automatic w32_t rl(w32_t x, int n);
    w32_t y = x;
    repeat (n) y = {y[30:0], y[31]};
    return y;
  endfunction

  function automatic blk_t from_bits(bit [255:0] v);
    blk_t b;
    for (int k = 0; k < 8; k++) b[k] = v[255 - 32*k -: 32];
    return b;
  endfunction

  function automatic bit [255:0] to_bits(blk_t b);
    bit [255:0] v;
    for (int k = 0; k < 8; k++) v[255 - 32*k -: 32] = b[k];
    return v;
  endfunction

  // a(x) * x mod x^8 + x^4 + x^3 + x + 1, coefficient k = word k.
  function automatic blk_t times_x(blk_t a);
    blk_t y;
    w32_t hi = a[7];
    for (int k = 7; k > 0; k--) y[k] = a[k-1];
    y[0] = 32'h0;
    // x^8 = x^4 + x^3 + x + 1
    y[0] ^= hi; y[1] ^= hi; y[3] ^= hi; y[4] ^= hi;
    return y;
  endfunction

  function automatic void sub_crumb(ref w32_t p0, ref w32_t p1, ref w32_t p2, ref w32_t p3);
    w32_t q0 = 0, q1 = 0, q2 = 0, q3 = 0;
    for (int l = 0; l < 32; l++) begin
      bit [3:0] s = REF_SBOX[{p3[l], p2[l], p1[l], p0[l]}];
      q0[l] = s[0]; q1[l] = s[1]; q2[l] = s[2]; q3[l] = s[3];
    end
    p0 = q0; p1 = q1; p2 = q2; p3 = q3;
  endfunction

  function automatic void mix_word(ref w32_t u, ref w32_t v);
    v = v ^ u;
    u = rl(u, 2) ^ v;
    v = rl(v, 14) ^ u;
    u = rl(u, 10) ^ v;
    v = rl(v, 1);
  endfunction

  function automatic blk_t ref_sub_crumb_layer(blk_t a);
    sub_crumb(a[0], a[1], a[2], a[3]);
    sub_crumb(a[5], a[6], a[7], a[4]);
    return a;
  endfunction

  function automatic blk_t ref_step(blk_t a, w32_t c0, w32_t c4);
    a = ref_sub_crumb_layer(a);
    for (int k = 0; k < 4; k++) mix_word(a[k], a[k+4]);
    a[0] ^= c0;
    a[4] ^= c4;
    return a;
  endfunction

  function automatic blk_t ref_q(blk_t a, int j);
    for (int k = 4; k < 8; k++) a[k] = rl(a[k], j);
    for (int r = 0; r < 8; r++) a = ref_step(a, luffa_pkg::RC0[j][r], luffa_pkg::RC4[j][r]);
    return a;
  endfunction

  function automatic st_t ref_mi(st_t h, blk_t m);
    st_t  y;
    blk_t t, mm;
    for (int k = 0; k < 8; k++) t[k] = h[0][k] ^ h[1][k] ^ h[2][k];
    t  = times_x(t);
    mm = m;
    for (int j = 0; j < 3; j++) begin
      for (int k = 0; k < 8; k++) y[j][k] = h[j][k] ^ t[k] ^ mm[k];
      mm = times_x(mm);
    end
    return y;
  endfunction

  function automatic st_t ref_round(st_t h, blk_t m);
    st_t y = ref_mi(h, m);
    for (int j = 0; j < 3; j++) y[j] = ref_q(y[j], j);
    return y;
  endfunction

  function automatic st_t ref_iv();
    st_t h;
    for (int j = 0; j < 3; j++)
      for (int k = 0; k < 8; k++) h[j][k] = luffa_pkg::IV[j][k];
    return h;
  endfunction

  function automatic bit [255:0] ref_out(st_t h);
    blk_t z;
    for (int k = 0; k < 8; k++) z[k] = h[0][k] ^ h[1][k] ^ h[2][k];
    return to_bits(z);
  endfunction

  function automatic bit [255:0] ref_hash(bit [255:0] blocks [$]);
    st_t  h = ref_iv();
    blk_t zero = '{default: 0};
    foreach (blocks[i]) h = ref_round(h, from_bits(blocks[i]));
    h = ref_round(h, zero);
    return ref_out(h);
  endfunction

  function automatic bit [255:0] rand256();
    bit [255:0] v;
    for (int k = 0; k < 8; k++) v[32*k +: 32] = $urandom;
    return v;
  endfunction

endpackage
