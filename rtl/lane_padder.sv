// lane_padder: message padding and bit counter for one message block.
//
// Lane pads a message of l bits with zero bits up to a whole number of
// blocks (no length field, no padding at all when l is already a multiple of
// the block size). Given the number of message bits already hashed
// (bits_done) and l, this block clears the bits of data_in that lie past the
// end of the message and forms the counter C_i = min(bits_done + BLOCK_W, l),
// the number of message bits hashed including this block. last is high when
// this block reaches the end of the message. Combinational.
module lane_padder #(
  parameter int unsigned BLOCK_W = 512  // 512 (Lane-224/256) or 1024 (Lane-384/512)
) (
  input  logic [BLOCK_W-1:0] data_in,    // first message bit in the MSB
  input  logic [63:0]        bits_done,  // message bits hashed before this block
  input  logic [63:0]        msg_len,    // l
  output logic [BLOCK_W-1:0] data_out,
  output logic [63:0]        counter,    // C_i
  output logic               last
);

  localparam int unsigned BW = $clog2(BLOCK_W + 1);

  logic [63:0]        remaining;
  logic [BW-1:0]      valid_bits;
  logic [BLOCK_W-1:0] keep;

  always_comb begin
    remaining  = msg_len - bits_done;
    last       = (remaining <= 64'(BLOCK_W));
    valid_bits = last ? BW'(remaining) : BW'(BLOCK_W);
    // Ones in the valid_bits most significant positions.
    keep       = ~({BLOCK_W{1'b1}} >> valid_bits);
    data_out   = data_in & keep;
    counter    = last ? msg_len : bits_done + 64'(BLOCK_W);
  end

endmodule
