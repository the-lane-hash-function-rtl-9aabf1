// lane_perm: one Lane permutation lane (P_j of the first layer or Q_j of the
// second), iterated one round per clock cycle.
//
// A lane is FULL_ROUNDS full rounds with round numbers R_BASE,
// R_BASE+1, ..., followed by one last round. Lane-256 uses FULL_ROUNDS = 5
// for P_j (R_BASE = 5j) and 2 for Q_j (R_BASE = 30 + 2j); Lane-512 uses 7 for
// P_j (R_BASE = 7j) and 3 for Q_j (R_BASE = 42 + 3j). The round number fixes
// the constants (from the lane's own lane_const_gen) and the counter word.
// Timing: start samples x_in and c_in and performs round 0 at that clock
// edge; the last round happens FULL_ROUNDS edges later, after which done is
// high for one cycle and x_out holds the result until the next start.
// A start while busy restarts the lane. The one-round-per-cycle schedule is
// this design's choice.
module lane_perm #(
  parameter int unsigned STATE_W     = 256,  // 256 (Lane-224/256) or 512 (Lane-384/512)
  parameter int unsigned FULL_ROUNDS = 5,    // full rounds; total rounds = FULL_ROUNDS + 1
  parameter int unsigned R_BASE      = 0     // round number of the first full round
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [STATE_W-1:0] x_in,
  input  logic [63:0]        c_in,
  output logic               busy,
  output logic               done,
  output logic [STATE_W-1:0] x_out
);

  localparam int unsigned NCOL = STATE_W / 32;
  localparam int unsigned RW   = $clog2(FULL_ROUNDS + 1);

  logic [STATE_W-1:0] x_q;
  logic [63:0]        c_q;
  logic [RW-1:0]      rnd_q;     // rounds already done
  logic               busy_q;
  logic               done_q;

  logic [STATE_W-1:0] r_in, r_out, k;
  logic [63:0]        c_cur;
  logic [RW-1:0]      rnd;
  logic               last;
  logic               r_odd;

  always_comb begin
    r_in  = start ? x_in : x_q;
    c_cur = start ? c_in : c_q;
    rnd   = start ? '0 : rnd_q;
    last  = (rnd == RW'(FULL_ROUNDS));
    r_odd = 1'((R_BASE + 32'(rnd)) % 2);
  end

  lane_const_gen #(.STATE_W(STATE_W), .FIRST_IDX(NCOL * R_BASE)) u_kgen (
    .clk(clk), .rst_n(rst_n), .load(start), .adv(busy_q && !start), .k_out(k));

  lane_round #(.STATE_W(STATE_W)) u_round (
    .x_in(r_in), .k_in(k), .counter(c_cur), .r_odd(r_odd), .last(last), .x_out(r_out));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q    <= '0;
      c_q    <= '0;
      rnd_q  <= '0;
      busy_q <= 1'b0;
      done_q <= 1'b0;
    end else begin
      done_q <= 1'b0;
      if (start || busy_q) begin
        x_q   <= r_out;
        c_q   <= c_cur;
        rnd_q <= rnd + 1'b1;
        if (last) begin
          busy_q <= 1'b0;
          done_q <= 1'b1;
        end else begin
          busy_q <= 1'b1;
        end
      end
    end
  end

  assign busy  = busy_q;
  assign done  = done_q;
  assign x_out = x_q;

endmodule
