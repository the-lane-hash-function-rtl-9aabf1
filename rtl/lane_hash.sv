// lane_hash: the Lane hash function (top level), one message at a time.
//
// Lane is an iterated hash: the chaining value starts at an initial value
// IV = f(0, phi || bin32(n) || 0 || S, 0) that depends on the digest size n
// and the optional salt S, each padded message block M_i updates it as
// H_i = f(H_{i-1}, M_i, C_i) with C_i the number of message bits hashed so
// far, and a final call f(H, phi || bin64(l) || 0 || S, 0) followed by
// truncation to n bits gives the digest. One lane_compress instance serves
// all three kinds of call; lane_fixed_block builds the two fixed blocks and
// lane_padder pads the last message block and forms C_i.
//
// Interface: pulse start while idle with msg_len (l, in bits), use_salt and
// salt valid. The design then asks for ceil(l / BLOCK_W) message blocks with
// blk_ready; a block is taken in a cycle where blk_valid and blk_ready are
// both high (first message bit in the MSB of blk_data; bits past the end of
// the message are ignored). digest_valid rises when the digest is ready and
// stays high, with digest, until the next start.
// Timing: each compression takes 9 cycles (12 for the 512-bit state) plus one
// cycle of control, so for a message of k blocks, offered without delay,
// digest_valid is first high 10*(k+2) cycles after the cycle in which start
// was high (13*(k+2) for the 512-bit state).
// The block handshake, the length-first interface and the cycle schedule are
// this design's choices; the computation follows the Lane definition.
// The two assertions at the end use rst_n in their disable condition; lint
// tools that see rst_n both there and as the flip-flops' asynchronous reset
// report it as used both ways, which is harmless.
module lane_hash
  import lane_pkg::*;
#(
  parameter int unsigned DIGEST_BITS = 256,  // n: 224, 256, 384 or 512
  localparam int unsigned STATE_W    = (DIGEST_BITS > 256) ? 512 : 256,
  localparam int unsigned BLOCK_W    = 2 * STATE_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [63:0]            msg_len,
  input  logic                   use_salt,
  input  logic [STATE_W-1:0]     salt,
  input  logic                   blk_valid,
  output logic                   blk_ready,
  input  logic [BLOCK_W-1:0]     blk_data,
  output logic                   busy,
  output logic                   digest_valid,
  output logic [DIGEST_BITS-1:0] digest
);

  typedef enum logic [2:0] {
    S_IDLE,      // waiting for start
    S_IV,        // IV derivation running
    S_MSG_WAIT,  // waiting for the next message block
    S_MSG,       // message block compression running
    S_OUT_GO,    // start the output transformation
    S_OUT        // output transformation running
  } state_t;

  state_t              state_q;
  logic [63:0]         len_q;
  logic [63:0]         done_bits_q;
  logic                last_q;      // block in flight ends the message
  logic                salt_en_q;
  logic [STATE_W-1:0]  salt_q;
  logic [STATE_W-1:0]  h_q;
  logic                dvalid_q;
  logic [DIGEST_BITS-1:0] digest_q;

  logic                 cmp_start, cmp_busy, cmp_done;
  logic [STATE_W-1:0]   cmp_h, cmp_hout;
  logic [BLOCK_W-1:0]   cmp_m;
  logic [63:0]          cmp_c;

  logic [BLOCK_W-1:0]   iv_blk, out_blk, pad_blk;
  logic [63:0]          pad_cnt;
  logic                 pad_last;
  logic                 take;

  // IV block is built from the inputs of the start cycle, the output block
  // from the registered length and salt.
  lane_fixed_block #(.STATE_W(STATE_W), .DIGEST_BITS(DIGEST_BITS)) u_ivblk (
    .is_output(1'b0), .use_salt(use_salt), .msg_len(64'd0), .salt(salt), .blk(iv_blk));

  lane_fixed_block #(.STATE_W(STATE_W), .DIGEST_BITS(DIGEST_BITS)) u_outblk (
    .is_output(1'b1), .use_salt(salt_en_q), .msg_len(len_q), .salt(salt_q), .blk(out_blk));

  lane_padder #(.BLOCK_W(BLOCK_W)) u_pad (
    .data_in(blk_data), .bits_done(done_bits_q), .msg_len(len_q),
    .data_out(pad_blk), .counter(pad_cnt), .last(pad_last));

  lane_compress #(.STATE_W(STATE_W)) u_cmp (
    .clk(clk), .rst_n(rst_n), .start(cmp_start), .h_in(cmp_h), .m_in(cmp_m), .c_in(cmp_c),
    .busy(cmp_busy), .done(cmp_done), .h_out(cmp_hout));

  always_comb begin
    blk_ready = (state_q == S_MSG_WAIT);
    take      = blk_ready && blk_valid;
    cmp_start = 1'b0;
    cmp_h     = h_q;
    cmp_m     = pad_blk;
    cmp_c     = pad_cnt;
    unique case (state_q)
      S_IDLE: begin
        cmp_start = start;
        cmp_h     = '0;
        cmp_m     = iv_blk;
        cmp_c     = '0;
      end
      S_MSG_WAIT: cmp_start = take;
      S_OUT_GO: begin
        cmp_start = 1'b1;
        cmp_m     = out_blk;
        cmp_c     = '0;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      len_q       <= '0;
      done_bits_q <= '0;
      last_q      <= 1'b0;
      salt_en_q   <= 1'b0;
      salt_q      <= '0;
      h_q         <= '0;
      dvalid_q    <= 1'b0;
      digest_q    <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (start) begin
          len_q       <= msg_len;
          done_bits_q <= '0;
          salt_en_q   <= use_salt;
          salt_q      <= salt;
          dvalid_q    <= 1'b0;
          state_q     <= S_IV;
        end
        S_IV: if (cmp_done) begin
          h_q     <= cmp_hout;
          state_q <= (len_q == 64'd0) ? S_OUT_GO : S_MSG_WAIT;
        end
        S_MSG_WAIT: if (take) begin
          done_bits_q <= pad_cnt;
          last_q      <= pad_last;
          state_q     <= S_MSG;
        end
        S_MSG: if (cmp_done) begin
          h_q     <= cmp_hout;
          state_q <= last_q ? S_OUT_GO : S_MSG_WAIT;
        end
        S_OUT_GO: state_q <= S_OUT;
        S_OUT: if (cmp_done) begin
          // Truncation keeps the leftmost DIGEST_BITS bits.
          digest_q <= cmp_hout[STATE_W-1 -: DIGEST_BITS];
          dvalid_q <= 1'b1;
          state_q  <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy         = (state_q != S_IDLE);
  assign digest_valid = dvalid_q;
  assign digest       = digest_q;

  // The compression function is only started when it is idle.
  a_cmp_idle: assert property (@(posedge clk) disable iff (!rst_n) cmp_start |-> !cmp_busy);
  // A block is only taken while one is still owed.
  a_blk_owed: assert property (@(posedge clk) disable iff (!rst_n) take |-> done_bits_q < len_q);

endmodule
