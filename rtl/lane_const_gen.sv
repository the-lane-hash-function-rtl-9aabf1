// lane_const_gen: on-the-fly generator of the Lane round constants for one
// permutation lane.
//
// The constants k_0, k_1, ... are the successive states of a 32-bit LFSR:
// k_i = (k_{i-1} >> 1) ^ (k_{i-1}[0] ? d0000001 : 0), starting from
// k_0 = 07fc703d. A round r needs NCOL consecutive constants
// k_{NCOL*r} .. k_{NCOL*r+NCOL-1}, so the register holds the first constant
// of the current round and k_out unrolls NCOL LFSR steps combinationally.
// Generating the constants instead of storing them is one of the two options
// the algorithm allows; the per-lane seed k_FIRST_IDX (the first constant of
// the lane's first full round) is worked out at elaboration.
// Timing: with load = 1, k_out already shows the first round's constants in
// that cycle and the register moves to the second round's; each adv = 1 moves
// it one round further.
module lane_const_gen
  import lane_pkg::*;
#(
  parameter int unsigned STATE_W   = 256,  // 256 (Lane-224/256) or 512 (Lane-384/512)
  parameter int unsigned FIRST_IDX = 0     // index of the first constant, NCOL * first round
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,   // restart at k_FIRST_IDX
  input  logic               adv,    // step one round
  output logic [STATE_W-1:0] k_out   // constants of the current round, column 0 in the MSBs
);

  localparam int unsigned NCOL = STATE_W / 32;
  localparam logic [31:0] SEED = lane_k(FIRST_IDX);

  logic [31:0] k_q;
  logic [31:0] cur;
  logic [31:0] nxt;

  always_comb begin
    cur = load ? SEED : k_q;
    nxt = cur;
    for (int j = 0; j < NCOL; j++) begin
      k_out[STATE_W - 32 - 32 * j +: 32] = nxt;
      nxt = lfsr_step(nxt);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           k_q <= SEED;
    else if (load || adv) k_q <= nxt;
  end

endmodule
