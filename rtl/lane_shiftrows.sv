// lane_shiftrows: ShiftRows of Lane, the AES ShiftRows applied to each of the
// two (256-bit state) or four (512-bit state) AES states side by side.
//
// The state is a row of 32-bit column words, column 0 in the MSBs, and in a
// column word row 0 is the most significant byte. Columns 4a..4a+3 form AES
// state a. Row r of each AES state is rotated left by r byte positions, so
// the byte at (row r, column c) takes the byte from (row r, column (c+r) mod 4)
// of the same AES state. Combinational.
module lane_shiftrows #(
  parameter int unsigned STATE_W = 256  // 256 (Lane-224/256) or 512 (Lane-384/512)
) (
  input  logic [STATE_W-1:0] x_in,
  output logic [STATE_W-1:0] x_out
);

  localparam int unsigned NCOL = STATE_W / 32;

  // Bit offset of the byte at (row, column) in the flat state vector.
  function automatic int unsigned pos(int unsigned col, int unsigned row);
    return STATE_W - 8 - 32 * col - 8 * row;
  endfunction

  for (genvar c = 0; c < NCOL; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      assign x_out[pos(c, r) +: 8] = x_in[pos((c / 4) * 4 + (c % 4 + r) % 4, r) +: 8];
    end
  end

endmodule
