// SubCrumb: bit-sliced S-box layer over four 32-bit words.
//
// For every bit position l = 0..31 the bits a3[l], a2[l], a1[l], a0[l] form a
// nibble (a3 the most significant) that passes through one S-box; the four
// output bits go back to the same position of y3..y0. 32 S-boxes work in
// parallel, so the block is combinational with no latency. The step function
// uses two of these, on (a0, a1, a2, a3) and on (a5, a6, a7, a4); that input
// ordering is made by the caller.
module luffa_subcrumb
  import luffa_pkg::*;
(
  input  word_t a0, a1, a2, a3,
  output word_t y0, y1, y2, y3
);
  for (genvar l = 0; l < 32; l++) begin : g_bit
    logic [3:0] nib_out;
    luffa_sbox u_sbox (.x({a3[l], a2[l], a1[l], a0[l]}), .y(nib_out));
    assign y0[l] = nib_out[0];
    assign y1[l] = nib_out[1];
    assign y2[l] = nib_out[2];
    assign y3[l] = nib_out[3];
  end
endmodule
