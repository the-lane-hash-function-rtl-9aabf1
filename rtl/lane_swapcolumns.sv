// lane_swapcolumns: SwapColumns of Lane, which moves columns between the AES
// states so that they mix with each other.
//
// 256-bit state: the column pairs form a 2x2 matrix that is transposed,
// giving x0 x1 x4 x5 x2 x3 x6 x7. 512-bit state: the 16 columns form a 4x4
// matrix that is transposed, output column i is input column 4*(i mod 4) + i/4.
// Pure wiring, combinational.
module lane_swapcolumns #(
  parameter int unsigned STATE_W = 256  // 256 (Lane-224/256) or 512 (Lane-384/512)
) (
  input  logic [STATE_W-1:0] x_in,
  output logic [STATE_W-1:0] x_out
);

  localparam int unsigned NCOL = STATE_W / 32;

  // Source column of output column i.
  function automatic int unsigned src(int unsigned i);
    if (NCOL == 8) return (i / 2 % 2) * 4 + (i / 4) * 2 + i % 2;
    else           return 4 * (i % 4) + i / 4;
  endfunction

  for (genvar i = 0; i < NCOL; i++) begin : g_col
    assign x_out[STATE_W - 32 - 32 * i +: 32] = x_in[STATE_W - 32 - 32 * src(i) +: 32];
  end

endmodule
