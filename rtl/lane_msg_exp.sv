// lane_msg_exp: Lane message expansion. The message block M (2*STATE_W bits)
// is split into four quarters m0..m3 and the chaining value H (STATE_W bits)
// into halves h0, h1 (first part in the MSBs). Six expanded words, each the
// concatenation of two halves, feed the six first-layer lanes:
//   W0 = h0^m0^m1^m2^m3     || h1^m0^m2
//   W1 = h0^h1^m0^m2^m3     || h0^m1^m2
//   W2 = h0^h1^m0^m1^m2     || h0^m0^m3
//   W3 = h0 || h1,   W4 = m0 || m1,   W5 = m2 || m3
// The same equations serve the 256-bit and 512-bit variants, with every
// part doubled in the latter. Combinational; w_out[j] is W_j.
module lane_msg_exp #(
  parameter int unsigned STATE_W = 256  // 256 (Lane-224/256) or 512 (Lane-384/512)
) (
  input  logic [STATE_W-1:0]     h_in,
  input  logic [2*STATE_W-1:0]   m_in,
  output logic [5:0][STATE_W-1:0] w_out
);

  localparam int unsigned HW = STATE_W / 2;

  logic [HW-1:0] m0, m1, m2, m3, h0, h1;

  always_comb begin
    {m0, m1, m2, m3} = m_in;
    {h0, h1}         = h_in;
    w_out[0] = {h0 ^ m0 ^ m1 ^ m2 ^ m3, h1 ^ m0 ^ m2};
    w_out[1] = {h0 ^ h1 ^ m0 ^ m2 ^ m3, h0 ^ m1 ^ m2};
    w_out[2] = {h0 ^ h1 ^ m0 ^ m1 ^ m2, h0 ^ m0 ^ m3};
    w_out[3] = {h0, h1};
    w_out[4] = {m0, m1};
    w_out[5] = {m2, m3};
  end

endmodule
