// lane_round: one round of a Lane permutation lane, as a single combinational
// stage.
//
// Full round:  SubBytes, ShiftRows, MixColumns, AddConstants, AddCounter,
//              SwapColumns.
// Last round (last = 1): SubBytes, ShiftRows, MixColumns, SwapColumns.
// A full round is two (or four) AES rounds side by side, with the round
// constants and a counter word as round key, followed by SwapColumns.
// k_in carries the round's NCOL constants, counter the 64-bit bit counter,
// r_odd selects the counter word c_{r mod 2}.
module lane_round #(
  parameter int unsigned STATE_W = 256  // 256 (Lane-224/256) or 512 (Lane-384/512)
) (
  input  logic [STATE_W-1:0] x_in,
  input  logic [STATE_W-1:0] k_in,     // round constants, column 0 in the MSBs
  input  logic [63:0]        counter,  // bit counter C
  input  logic               r_odd,    // full round number r is odd
  input  logic               last,     // LastRound: no constants, no counter
  output logic [STATE_W-1:0] x_out
);

  logic [STATE_W-1:0] s_sb, s_sr, s_mc, s_ac, s_ct, s_key;

  lane_subbytes    #(.STATE_W(STATE_W)) u_sb (.x_in(x_in), .x_out(s_sb));
  lane_shiftrows   #(.STATE_W(STATE_W)) u_sr (.x_in(s_sb), .x_out(s_sr));
  lane_mixcolumns  #(.STATE_W(STATE_W)) u_mc (.x_in(s_sr), .x_out(s_mc));
  lane_addconstants #(.STATE_W(STATE_W)) u_ac (.x_in(s_mc), .k_in(k_in), .x_out(s_ac));
  lane_addcounter  #(.STATE_W(STATE_W)) u_ct (.x_in(s_ac), .counter(counter), .r_odd(r_odd),
                                               .x_out(s_ct));

  always_comb s_key = last ? s_mc : s_ct;

  lane_swapcolumns #(.STATE_W(STATE_W)) u_sc (.x_in(s_key), .x_out(x_out));

endmodule
