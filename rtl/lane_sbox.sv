// lane_sbox: the AES S-box, the non-linear byte substitution of SubBytes.
//
// Computed from its definition rather than stored: the multiplicative
// inverse in GF(2^8) (modulus x^8+x^4+x^3+x+1, 0 mapped to 0) is a^254,
// formed with an addition chain of squarings and four multiplications, and is
// followed by the AES affine map with constant 63. Purely combinational.
// Lane reuses the AES S-box unchanged; computing it in logic instead of a
// table is this design's choice.
module lane_sbox
  import lane_pkg::*;
(
  input  logic [7:0] a,   // input byte
  output logic [7:0] y    // substituted byte
);

  always_comb y = sbox_calc(a);

endmodule
