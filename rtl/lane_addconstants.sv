// lane_addconstants: AddConstants of Lane. Column j of the state is XORed with
// the 32-bit round constant k_{NCOL*r+j}; the NCOL constants of the round come
// in on k_in in the same layout as the state (column 0's constant in the
// MSBs), supplied by lane_const_gen. Within a column word the constant's most
// significant byte meets row 0, following the big-endian convention.
// Combinational.
module lane_addconstants #(
  parameter int unsigned STATE_W = 256  // 256 (Lane-224/256) or 512 (Lane-384/512)
) (
  input  logic [STATE_W-1:0] x_in,
  input  logic [STATE_W-1:0] k_in,   // k_{NCOL*r} .. k_{NCOL*r+NCOL-1}
  output logic [STATE_W-1:0] x_out
);

  always_comb x_out = x_in ^ k_in;

endmodule
