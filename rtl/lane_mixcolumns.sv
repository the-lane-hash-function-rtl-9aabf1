// lane_mixcolumns: MixColumns of Lane, identical to AES MixColumns, applied to
// all 8 (256-bit state) or 16 (512-bit state) columns.
//
// Each column (b0 top .. b3 bottom, b0 in the MSBs of the column word) is
// multiplied over GF(2^8) by the circulant matrix with first row 02 03 01 01.
// Multiplication by 02 is xtime, by 03 is xtime plus the byte itself.
// Combinational.
module lane_mixcolumns
  import lane_pkg::*;
#(
  parameter int unsigned STATE_W = 256  // 256 (Lane-224/256) or 512 (Lane-384/512)
) (
  input  logic [STATE_W-1:0] x_in,
  output logic [STATE_W-1:0] x_out
);

  localparam int unsigned NCOL = STATE_W / 32;

  function automatic logic [31:0] mix(logic [31:0] col);
    logic [7:0] b0, b1, b2, b3;
    {b0, b1, b2, b3} = col;
    return {xtime(b0) ^ xtime(b1) ^ b1 ^ b2 ^ b3,
            b0 ^ xtime(b1) ^ xtime(b2) ^ b2 ^ b3,
            b0 ^ b1 ^ xtime(b2) ^ xtime(b3) ^ b3,
            xtime(b0) ^ b0 ^ b1 ^ b2 ^ xtime(b3)};
  endfunction

  for (genvar c = 0; c < NCOL; c++) begin : g_col
    assign x_out[32*c +: 32] = mix(x_in[32*c +: 32]);
  end

endmodule
