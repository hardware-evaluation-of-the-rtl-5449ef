// MixWord: linear mixing of two 32-bit words x_k and x_(k+4).
//
// Four XOR/rotate stages, exactly as in the MixWord diagram:
//   r = x_(k+4) ^ x_k
//   l = (x_k <<< SIGMA1) ^ r
//   r = (r <<< SIGMA2) ^ l
//   y_k = (l <<< SIGMA3) ^ r
//   y_(k+4) = r <<< SIGMA4
// with rotation amounts 2, 14, 10 and 1 of the source architecture.
// Combinational, no latency.
module luffa_mixword
  import luffa_pkg::*;
#(
  parameter int unsigned S1 = SIGMA1,
  parameter int unsigned S2 = SIGMA2,
  parameter int unsigned S3 = SIGMA3,
  parameter int unsigned S4 = SIGMA4
) (
  input  word_t xl,   // x_k
  input  word_t xr,   // x_(k+4)
  output word_t yl,   // y_k
  output word_t yr    // y_(k+4)
);
  word_t r1, l1, r2;
  always_comb begin
    r1 = xr ^ xl;
    l1 = rotl(xl, S1) ^ r1;
    r2 = rotl(r1, S2) ^ l1;
    yl = rotl(l1, S3) ^ r2;
    yr = rotl(r2, S4);
  end
endmodule
