// Shared types, constants and small functions of the Luffa-224/256 cores.
//
// A Luffa-224/256 chaining state is w = 3 chunks of 256 bits. Each chunk is
// eight 32-bit words a0..a7; word a0 sits in the most significant 32 bits of
// a chunk or of a 256-bit message block, so a block read as a big-endian byte
// string maps word by word onto a0..a7.
//
// The structure (w = 3, the step function, the MixWord rotations 2, 14, 10
// and 1, eight steps per round, a blank round and the XOR output function)
// follows the evaluated architecture description. The S-box table, the
// initial chaining values, the step constants, the multiplication by 2 in the
// message injection and the per-chunk tweak rotation are not part of that
// description; they are filled in from the Luffa (v2) specification and have
// not been checked against its official test vectors here. Replace the tables
// below if they disagree.
package luffa_pkg;

  localparam int unsigned W      = 3;   // sub-permutations of Luffa-224/256
  localparam int unsigned STEPS  = 8;   // step functions per round
  localparam int unsigned SIGMA1 = 2;
  localparam int unsigned SIGMA2 = 14;
  localparam int unsigned SIGMA3 = 10;
  localparam int unsigned SIGMA4 = 1;

  typedef logic [31:0]         word_t;
  typedef logic [0:7][31:0]    chunk_t;  // [0] = a0 = most significant word
  typedef chunk_t [0:W-1]      state_t;  // [0] = chunk of Q_0
  typedef logic [$clog2(STEPS)-1:0] step_idx_t;
  typedef logic [1:0]          chunk_idx_t;

  // 4-bit S-box, index = {a3[l], a2[l], a1[l], a0[l]}.
  localparam logic [3:0] SBOX [16] = '{
    4'd13, 4'd14, 4'd0, 4'd1, 4'd5, 4'd10, 4'd7, 4'd6,
    4'd11, 4'd3,  4'd9, 4'd12, 4'd15, 4'd8, 4'd2, 4'd4
  };

  // Initial chaining values V_0..V_2.
  localparam state_t IV = '{
    '{32'h6d251e69, 32'h44b051e0, 32'h4eaa6fb4, 32'hdbf78465,
      32'h6e292011, 32'h90152df4, 32'hee058139, 32'hdef610bb},
    '{32'hc3b44b95, 32'hd9d2f256, 32'h70eee9a0, 32'hde099fa3,
      32'h5d9b0557, 32'h8fc944b3, 32'hcf1ccf0e, 32'h746cd581},
    '{32'hf7efc89d, 32'h5dba5781, 32'h04016ce5, 32'had659c05,
      32'h0306194f, 32'h666d1836, 32'h24aa230a, 32'h8b264ae7}
  };

  // Step constants: RC0[j][r] is XORed into a0 and RC4[j][r] into a4 in
  // step r of Q_j.
  localparam word_t RC0 [W][STEPS] = '{
    '{32'h303994a6, 32'hc0e65299, 32'h6cc33a12, 32'hdc56983e,
      32'h1e00108f, 32'h7800423d, 32'h8f5b7882, 32'h96e1db12},
    '{32'hb6de10ed, 32'h70f47aae, 32'h0707a3d4, 32'h1c1e8f51,
      32'h707a3d45, 32'haeb28562, 32'hbaca1589, 32'h40a46f3e},
    '{32'hfc20d9d2, 32'h34552e25, 32'h7ad8818f, 32'h8438764a,
      32'hbb6de032, 32'hedb780c8, 32'hd9847356, 32'ha2c78434}
  };
  localparam word_t RC4 [W][STEPS] = '{
    '{32'he0337818, 32'h441ba90d, 32'h7f34d442, 32'h9389217f,
      32'he5a8bce6, 32'h5274baf4, 32'h26889ba7, 32'h9a226e9d},
    '{32'h01685f3d, 32'h05a17cf4, 32'hbd09caca, 32'hf4272b28,
      32'h144ae5cc, 32'hfaa7ae2b, 32'h2e48f1c1, 32'hb923c704},
    '{32'he25e72c1, 32'he623bb72, 32'h5c58a4a4, 32'h1e38e2e7,
      32'h78e38b9d, 32'h27586719, 32'h36eda57f, 32'h703aace7}
  };

  function automatic word_t rotl(input word_t x, input int unsigned n);
    return (x << n) | (x >> (32 - n));
  endfunction

  // Multiplication by x in GF(2^32)[x]/(x^8 + x^4 + x^3 + x + 1), where
  // word a_k is the coefficient of x^k.
  function automatic chunk_t mul2(input chunk_t a);
    chunk_t y;
    y[0] = a[7];
    y[1] = a[0] ^ a[7];
    y[2] = a[1];
    y[3] = a[2] ^ a[7];
    y[4] = a[3] ^ a[7];
    y[5] = a[4];
    y[6] = a[5];
    y[7] = a[6];
    return y;
  endfunction

  // Tweak at the input of Q_j: words a4..a7 rotated left by j bits.
  function automatic chunk_t tweak(input chunk_t a, input int unsigned j);
    chunk_t y;
    y = a;
    if (j != 0) begin
      for (int k = 4; k < 8; k++) y[k] = rotl(a[k], j);
    end
    return y;
  endfunction

  function automatic state_t tweak_all(input state_t s);
    state_t y;
    for (int j = 0; j < W; j++) y[j] = tweak(s[j], j);
    return y;
  endfunction

endpackage
