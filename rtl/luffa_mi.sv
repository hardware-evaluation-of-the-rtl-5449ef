// Message injection MI for w = 3 (Luffa-224/256).
//
// As drawn in the round-function figure: the three chunks are XORed, the sum
// is multiplied by 2 and added to every chunk, and the message block is added
// to chunk 0, the message times 2 to chunk 1 and the message times 4 to
// chunk 2:
//   t   = 2 * (h0 ^ h1 ^ h2)
//   hj' = hj ^ t ^ (2^j * m)
// Multiplication by 2 is the word-wise shift with feedback of luffa_pkg::mul2.
// Combinational.
module luffa_mi
  import luffa_pkg::*;
(
  input  state_t h,
  input  chunk_t m,
  output state_t y
);
  chunk_t t, m2, m4;
  always_comb begin
    t  = mul2(h[0] ^ h[1] ^ h[2]);
    m2 = mul2(m);
    m4 = mul2(m2);
    y[0] = h[0] ^ t ^ m;
    y[1] = h[1] ^ t ^ m2;
    y[2] = h[2] ^ t ^ m4;
  end
endmodule
