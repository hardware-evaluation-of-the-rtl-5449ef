// Step-constant table for AddConstant.
//
// Returns the two precalculated 32-bit constants of step r (0..7) of
// sub-permutation Q_j (0..2): c0 goes into word 0, c4 into word 4. A plain
// combinational lookup into the tables of luffa_pkg; an index j of 3 returns
// zeros. The architectures only state that the constants are precalculated;
// the values are those of the Luffa specification.
module luffa_rc
  import luffa_pkg::*;
(
  input  chunk_idx_t j,
  input  step_idx_t  r,
  output word_t      c0,
  output word_t      c4
);
  always_comb begin
    c0 = '0;
    c4 = '0;
    if (j < chunk_idx_t'(W)) begin
      c0 = RC0[j][r];
      c4 = RC4[j][r];
    end
  end
endmodule
