// 4-bit S-box of the Luffa SubCrumb layer.
//
// Purely combinational table lookup: y = SBOX[x]. The input nibble is built
// from one bit position of four words, x = {a3[l], a2[l], a1[l], a0[l]}, as
// drawn in the SubCrumb figure of the architecture description. The table
// values themselves come from the Luffa specification (see luffa_pkg).
module luffa_sbox
  import luffa_pkg::*;
(
  input  logic [3:0] x,
  output logic [3:0] y
);
  always_comb y = SBOX[x];
endmodule
