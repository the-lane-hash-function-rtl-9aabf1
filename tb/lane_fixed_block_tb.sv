// lane_fixed_block_tb: the fixed-format blocks for Lane-256 (512-bit block)
// and Lane-384 (1024-bit block), in all four flag-byte cases: output
// transformation without / with salt (00 / 01) and IV derivation without /
// with salt (02 / 03). The expected blocks are assembled byte by byte.
module lane_fixed_block_tb;
  logic         is_out, use_salt;
  logic [63:0]  len;
  logic [511:0] salt512;
  logic [511:0] b256;
  logic [1023:0] b384;
  int checks = 0;
  int failures = 0;

  lane_fixed_block #(.STATE_W(256), .DIGEST_BITS(256)) dut256 (.is_output(is_out), .use_salt(use_salt),
    .msg_len(len), .salt(salt512[255:0]), .blk(b256));
  lane_fixed_block #(.STATE_W(512), .DIGEST_BITS(384)) dut384 (.is_output(is_out), .use_salt(use_salt),
    .msg_len(len), .salt(salt512), .blk(b384));

  // Byte string of nbytes bytes: flag, then either bin32(n) or bin64(l), zeros,
  // and the salt (or zeros) in the last nbytes/2 bytes.
  function automatic logic [1023:0] expect_blk(int nbytes, bit o, bit s, int n, logic [63:0] l,
                                              logic [511:0] salt);
    logic [7:0] by [128];
    logic [1023:0] v;
    for (int i = 0; i < 128; i++) by[i] = 8'h00;
    by[0] = o ? (s ? 8'h01 : 8'h00) : (s ? 8'h03 : 8'h02);
    if (o) for (int i = 0; i < 8; i++) by[1 + i] = l[63 - 8 * i -: 8];
    else   for (int i = 0; i < 4; i++) by[1 + i] = 8'(n >> (24 - 8 * i));
    if (s) for (int i = 0; i < nbytes / 2; i++) by[nbytes / 2 + i] = salt[8 * (nbytes / 2) - 1 - 8 * i -: 8];
    v = '0;
    for (int i = 0; i < nbytes; i++) v[8 * (nbytes - 1 - i) +: 8] = by[i];
    return v;
  endfunction

  initial begin
    for (int t = 0; t < 16; t++) begin
      is_out   = t[1];
      use_salt = t[0];
      len      = {$urandom, $urandom};
      for (int i = 0; i < 16; i++) salt512[32 * i +: 32] = $urandom;
      #1;
      checks++;
      if (b256 !== expect_blk(64, is_out, use_salt, 256, len, salt512)[511:0]) begin
        failures++;
        $display("FAIL 256 out=%0b salt=%0b: %h", is_out, use_salt, b256);
      end
      checks++;
      if (b384 !== expect_blk(128, is_out, use_salt, 384, len, salt512)) begin
        failures++;
        $display("FAIL 384 out=%0b salt=%0b", is_out, use_salt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
