// Output function OF of the finalization.
//
// XORs the w = 3 chunks of the state into one 256-bit value Z_0, which is
// the Luffa-256 digest (Luffa-224 takes its first 224 bits, z[255:32]).
// Combinational.
module luffa_of
  import luffa_pkg::*;
(
  input  state_t       h,
  output logic [255:0] z
);
  always_comb z = h[0] ^ h[1] ^ h[2];
endmodule
