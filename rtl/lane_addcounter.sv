// lane_addcounter: AddCounter of Lane. The 64-bit bit counter C = c0 || c1
// (c0 the most significant word) contributes one word per round: c_{r mod 2}
// is XORed into column 3, the fourth column of the first AES state. The same
// rule holds for the 256-bit and 512-bit states. Combinational.
module lane_addcounter #(
  parameter int unsigned STATE_W = 256  // 256 (Lane-224/256) or 512 (Lane-384/512)
) (
  input  logic [STATE_W-1:0] x_in,
  input  logic [63:0]        counter,  // C, big-endian
  input  logic               r_odd,    // r mod 2
  output logic [STATE_W-1:0] x_out
);

  logic [31:0] cw;

  always_comb begin
    cw    = r_odd ? counter[31:0] : counter[63:32];
    x_out = x_in;
    x_out[STATE_W - 128 +: 32] = x_in[STATE_W - 128 +: 32] ^ cw;
  end

endmodule
