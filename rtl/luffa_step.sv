// One step function of a Luffa sub-permutation Q_j.
//
// SubCrumb on (a0, a1, a2, a3) and on (a5, a6, a7, a4), then four MixWord
// blocks on the word pairs (k, k+4), k = 0..3, then AddConstant: c0 is XORed
// into word 0 and c4 into word 4. This is the 64 S-boxes and 4 MixWord
// blocks the architectures instantiate once per sub-permutation.
// Combinational; the constants for step r of Q_j come from luffa_rc.
module luffa_step
  import luffa_pkg::*;
(
  input  chunk_t a,
  input  word_t  c0,
  input  word_t  c4,
  output chunk_t y
);
  chunk_t s;   // after SubCrumb
  chunk_t m;   // after MixWord

  luffa_subcrumb u_sc_lo (
    .a0(a[0]), .a1(a[1]), .a2(a[2]), .a3(a[3]),
    .y0(s[0]), .y1(s[1]), .y2(s[2]), .y3(s[3])
  );
  luffa_subcrumb u_sc_hi (
    .a0(a[5]), .a1(a[6]), .a2(a[7]), .a3(a[4]),
    .y0(s[5]), .y1(s[6]), .y2(s[7]), .y3(s[4])
  );

  for (genvar k = 0; k < 4; k++) begin : g_mix
    luffa_mixword u_mw (.xl(s[k]), .xr(s[k+4]), .yl(m[k]), .yr(m[k+4]));
  end

  always_comb begin
    y    = m;
    y[0] = m[0] ^ c0;
    y[4] = m[4] ^ c4;
  end
endmodule
