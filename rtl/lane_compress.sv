// lane_compress: the Lane compression function H_i = f(H_{i-1}, M_i, C_i).
//
// Structure: the message expansion turns (H, M) into six words W0..W5, which
// pass through the six first-layer permutation lanes P0..P5 in parallel.
// Two XOR combiners fold their outputs into P0^P1^P2 and P3^P4^P5, which
// pass through the second-layer lanes Q0 and Q1 in parallel, and a third
// XOR combiner gives H_i = Q0 ^ Q1. Every lane is keyed with the counter C_i
// and uses its own range of round numbers (Lane-256: P_j rounds 5j..5j+4,
// Q_j rounds 30+2j..31+2j).
// Which first-layer lanes meet in which combiner is this design's reading of
// the structure; each lane having its own round hardware is also its own
// choice.
// Timing: start samples h_in, m_in and c_in; the first layer takes P_FULL+1
// cycles and the second Q_FULL+1 more, so done pulses 9 cycles after start
// for the 256-bit state (12 for 512). h_out then holds H_i until the next
// start.
module lane_compress
  import lane_pkg::*;
#(
  parameter int unsigned STATE_W = 256  // 256 (Lane-224/256) or 512 (Lane-384/512)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [STATE_W-1:0]   h_in,
  input  logic [2*STATE_W-1:0] m_in,
  input  logic [63:0]          c_in,
  output logic                 busy,
  output logic                 done,
  output logic [STATE_W-1:0]   h_out
);

  localparam int unsigned PF = p_full(STATE_W);
  localparam int unsigned QF = q_full(STATE_W);

  logic [5:0][STATE_W-1:0] w;
  logic [5:0][STATE_W-1:0] p_out;
  logic [5:0]              p_done, p_busy;
  logic [1:0][STATE_W-1:0] q_in, q_out;
  logic [1:0]              q_done, q_busy;
  logic [63:0]             c_q;
  logic [63:0]             c_cur;

  lane_msg_exp #(.STATE_W(STATE_W)) u_exp (.h_in(h_in), .m_in(m_in), .w_out(w));

  // The counter is needed again when the second layer starts.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     c_q <= '0;
    else if (start) c_q <= c_in;
  end

  always_comb c_cur = start ? c_in : c_q;

  for (genvar j = 0; j < 6; j++) begin : g_p
    lane_perm #(.STATE_W(STATE_W), .FULL_ROUNDS(PF), .R_BASE(PF * j)) u_p (
      .clk(clk), .rst_n(rst_n), .start(start), .x_in(w[j]), .c_in(c_cur),
      .busy(p_busy[j]), .done(p_done[j]), .x_out(p_out[j]));
  end

  // First-layer XOR combiners.
  always_comb begin
    q_in[0] = p_out[0] ^ p_out[1] ^ p_out[2];
    q_in[1] = p_out[3] ^ p_out[4] ^ p_out[5];
  end

  for (genvar j = 0; j < 2; j++) begin : g_q
    lane_perm #(.STATE_W(STATE_W), .FULL_ROUNDS(QF), .R_BASE(6 * PF + QF * j)) u_q (
      .clk(clk), .rst_n(rst_n), .start(p_done[0] && !start), .x_in(q_in[j]), .c_in(c_q),
      .busy(q_busy[j]), .done(q_done[j]), .x_out(q_out[j]));
  end

  // Second-layer XOR combiner.
  always_comb h_out = q_out[0] ^ q_out[1];

  assign busy = (|p_busy) | (|q_busy) | (|p_done);
  assign done = &q_done;  // both second-layer lanes finish together

endmodule
