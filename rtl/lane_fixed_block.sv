// lane_fixed_block: the two message blocks of fixed format that Lane hashes
// with a zero counter.
//
//   IV derivation (is_output = 0):    phi || bin32(n) || 0...0 || S
//   output transformation (is_output = 1): phi || bin64(l) || 0...0 || S
//
// n is the digest size in bits, l the message length in bits, S the salt
// (zero when none is used) in the last STATE_W bits. The flag byte phi keeps
// the four zero-counter calls apart: 00 output / no salt, 01 output / salt,
// 02 IV / no salt, 03 IV / salt. Combinational.
module lane_fixed_block #(
  parameter int unsigned STATE_W     = 256,  // 256 (Lane-224/256) or 512 (Lane-384/512)
  parameter int unsigned DIGEST_BITS = 256   // n: 224, 256, 384 or 512
) (
  input  logic                 is_output,
  input  logic                 use_salt,
  input  logic [63:0]          msg_len,
  input  logic [STATE_W-1:0]   salt,
  output logic [2*STATE_W-1:0] blk
);

  localparam int unsigned BW = 2 * STATE_W;

  logic [7:0] phi;

  always_comb begin
    phi = {6'b0, !is_output, use_salt};
    blk = '0;
    blk[BW-1 -: 8] = phi;
    if (is_output) blk[BW-9 -: 64] = msg_len;
    else           blk[BW-9 -: 32] = 32'(DIGEST_BITS);
    if (use_salt)  blk[STATE_W-1:0] = salt;
  end

endmodule
