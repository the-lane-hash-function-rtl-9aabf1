// lane_subbytes: SubBytes of Lane, the AES S-box applied to every byte of the
// Lane state independently (32 S-boxes for the 256-bit state of Lane-224/256,
// 64 for the 512-bit state of Lane-384/512). Combinational, no latency.
// Interface: x_in -> x_out, both STATE_W bits, byte order irrelevant here.
module lane_subbytes #(
  parameter int unsigned STATE_W = 256  // 256 (Lane-224/256) or 512 (Lane-384/512)
) (
  input  logic [STATE_W-1:0] x_in,
  output logic [STATE_W-1:0] x_out
);

  for (genvar i = 0; i < STATE_W / 8; i++) begin : g_byte
    lane_sbox u_sbox (.a(x_in[8*i +: 8]), .y(x_out[8*i +: 8]));
  end

endmodule
