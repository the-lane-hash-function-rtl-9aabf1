// lane_hash_variant_check: runs the lane_hash end-to-end cases for one
// digest size DIGEST_BITS (224, 384 or 512) and reports its check and failure
// counts; lane_hash_variants_tb instantiates one per size. Expected digests
// come from an independent software model of Lane.
module lane_hash_variant_check #(
  parameter int unsigned DIGEST_BITS = 224
) (
  output logic fin,
  output int   n_checks,
  output int   n_failures
);
  initial fin = 1'b0;
  assign n_checks   = checks;
  assign n_failures = failures;

  localparam int unsigned STATE_W = (DIGEST_BITS > 256) ? 512 : 256;
  localparam int unsigned BLOCK_W = 2 * STATE_W;
  localparam int unsigned CLAT    = (STATE_W > 256) ? 12 : 9;  // cycles per compression
  localparam int          NCASE   = 8;

  logic                   clk = 1'b0;
  logic                   rst_n = 1'b0;
  logic                   start = 1'b0;
  logic [63:0]            msg_len = '0;
  logic                   use_salt = 1'b0;
  logic [STATE_W-1:0]     salt = '0;
  logic                   blk_valid = 1'b0;
  logic                   blk_ready;
  logic [BLOCK_W-1:0]     blk_data = '0;
  logic                   busy;
  logic                   digest_valid;
  logic [DIGEST_BITS-1:0] digest;

  always #5 clk = ~clk;

  lane_hash #(.DIGEST_BITS(DIGEST_BITS)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .msg_len(msg_len), .use_salt(use_salt), .salt(salt),
    .blk_valid(blk_valid), .blk_ready(blk_ready), .blk_data(blk_data), .busy(busy),
    .digest_valid(digest_valid), .digest(digest));

  logic [63:0]            case_len  [NCASE];
  logic                   case_salt [NCASE];
  logic [511:0] case_exp  [NCASE];

  initial begin
    if (DIGEST_BITS == 224) begin
      case_len[0] = 64'd0; case_salt[0] = 1'b0; case_exp[0] = 512'h059b1d054b857bb991c68f42122b6871b3b36c4a3af2d50899a73cda;
      case_len[1] = 64'd5; case_salt[1] = 1'b0; case_exp[1] = 512'ha873e47c449e2b665ff2363a25f8461e05bdd1b00740cd24f8fd5a74;
      case_len[2] = 64'd512; case_salt[2] = 1'b0; case_exp[2] = 512'hc847787c613297658761745bb0fcaa9f4920f9acf3ca0ae3b5ac35ac;
      case_len[3] = 64'd1024; case_salt[3] = 1'b0; case_exp[3] = 512'hb6adbb1a3a31fb8817829126d717b4769bd8e9b9ae81f716edefad14;
      case_len[4] = 64'd1000; case_salt[4] = 1'b1; case_exp[4] = 512'h5028a94f1ee68c48fd06844623b8624734edfb73f680b547482364b5;
      case_len[5] = 64'd1537; case_salt[5] = 1'b1; case_exp[5] = 512'h62586ec1780f52a635b0ccbe8b549546e0119e598715328843726f14;
      case_len[6] = 64'd0; case_salt[6] = 1'b1; case_exp[6] = 512'h3741e1e6e3e94991e664f9cbd9bacef285e6cad48e1ac02ac05c1f79;
      case_len[7] = 64'd3000; case_salt[7] = 1'b0; case_exp[7] = 512'h41bc39b6d704d72f2f46df6e842e91a290e89d6038fa3fa6131a482a;
    end
    if (DIGEST_BITS == 384) begin
      case_len[0] = 64'd0; case_salt[0] = 1'b0; case_exp[0] = 512'ha77d6bd42e74f21b9ec470ae0525c53f5b35d6b6c3241f8007f4cacc6aa496df663a90a35eef8d45703452742e33110c;
      case_len[1] = 64'd5; case_salt[1] = 1'b0; case_exp[1] = 512'h828503654e1d4aa7d8240607d72b49dd3a1b56a1925e6c757c2bca72661ed691019ae4f8ab7709dc52cf53dcf4a0b432;
      case_len[2] = 64'd512; case_salt[2] = 1'b0; case_exp[2] = 512'h34e67365a8a55aaee9f23c856971234db6577931e803add950d6772251d10be19c2304512942ed812be9a90f9390ed49;
      case_len[3] = 64'd1024; case_salt[3] = 1'b0; case_exp[3] = 512'hfacb8ab69828aa3bf553ea4e257882aa6de25007e88655f5442a58ef38d93553dc34170e17e5cf33a7fd0ae622880b23;
      case_len[4] = 64'd1000; case_salt[4] = 1'b1; case_exp[4] = 512'hffc43d62e2bee0aa347c52f7ea742801f94eb8aeb10ee7ed913ff979f1ac7d84e140e6998b15d525784a51beea4a8f9c;
      case_len[5] = 64'd1537; case_salt[5] = 1'b1; case_exp[5] = 512'h65d892c4126403b967b401308ea716c4173d87a54624b7dda5712e6bcaacdfdfb427b5ed2d086a9761a23519fea4e23a;
      case_len[6] = 64'd0; case_salt[6] = 1'b1; case_exp[6] = 512'he7993f09abfe4d11b92a3bd2b8a1f7d4a45199c12d6193c2ab9e64b0aaec97a227016822cffd25609ce1724c7992d3ae;
      case_len[7] = 64'd3000; case_salt[7] = 1'b0; case_exp[7] = 512'h3c45297113e7c1fecbeed5e0a5259c0f2392d2782a938148a4eb5704be5431f847a1877994a4a27de49db1229aa20964;
    end
    if (DIGEST_BITS == 512) begin
      case_len[0] = 64'd0; case_salt[0] = 1'b0; case_exp[0] = 512'hbdee2ca1f13ab522a3a9e045dc6f236deab315dc8c322ee20333837762a422ca43bcd6f79964cded6531011f3207b76a6859097eaa5fc6e865bedfa80d73ee91;
      case_len[1] = 64'd5; case_salt[1] = 1'b0; case_exp[1] = 512'hde50567afb7cc0ab9bf46c9930b9351273da047f7387251ae22785d878dbf92e35a27127bac25b1d0147ff1e299d8f8721ecb8e9941b2a390bf4691d14db5c5a;
      case_len[2] = 64'd512; case_salt[2] = 1'b0; case_exp[2] = 512'h0cf8766efa9740b02207f0eada995fb7d8ff06550ae2b1b4a5a9ac53eea33377c50803ffc23a22afbdd7a951281212908435bc5d8a222e3d3173bc47b53b0043;
      case_len[3] = 64'd1024; case_salt[3] = 1'b0; case_exp[3] = 512'h925b8c78c060f325274b06bcd2101088be2f910bb6601f0c85de08bd35ec19f64a03ec19ec4bd3c2c7e96f56f600c9b45433945e2b0b9737463d57a4d7a8b2b4;
      case_len[4] = 64'd1000; case_salt[4] = 1'b1; case_exp[4] = 512'hf6f959b1caf691a9feffafb9299e06e6ee9ecb8bdd4f6f9cf79e1aee8b6bb3899ffcc88ff33bc3026d95e053a8e9d273421cf01f82ce7746d29d720039f7dc51;
      case_len[5] = 64'd1537; case_salt[5] = 1'b1; case_exp[5] = 512'hf9a719bfe6d6fc9d719f78bee5b7b6fc82c372987a91ff3a5cec1a11593bebee029401639f0898afcc6cfef102da30930eb697011c9e384c658f93e38d0b01ec;
      case_len[6] = 64'd0; case_salt[6] = 1'b1; case_exp[6] = 512'h575dcfa3f553f072e7f7b114af1c1337e2152206d11052a2b027b4eab82ec18477477fde0d8394461d72a5f847d28d73ab1d8afaf76b541d70adc92c67971cb1;
      case_len[7] = 64'd3000; case_salt[7] = 1'b0; case_exp[7] = 512'h50925b7eae0d368b7642b79772943b1bd89511e7922fd5c26914b518f4b92c1ebcf61da5c905d241d2abb7b4536f82fc690527dad6a1bde35cde5388c94bbe0d;
    end
  end

  // Message bytes are m_i = (37*i + 11) mod 256, first byte in the MSBs; the
  // salt bytes are s_i = (101*i + 5) mod 256. Block k holds bytes
  // k*BLOCK_W/8 .. (k+1)*BLOCK_W/8 - 1 of that stream; the bits past the end of
  // the message are left in on purpose and must be ignored.
  function automatic logic [BLOCK_W-1:0] msg_block(int k);
    logic [BLOCK_W-1:0] b;
    for (int j = 0; j < BLOCK_W / 8; j++)
      b[BLOCK_W - 8 - 8 * j +: 8] = 8'(((k * (BLOCK_W / 8) + j) * 37 + 11) % 256);
    return b;
  endfunction

  function automatic logic [STATE_W-1:0] salt_pattern();
    logic [STATE_W-1:0] s;
    for (int j = 0; j < STATE_W / 8; j++) s[STATE_W - 8 - 8 * j +: 8] = 8'((j * 101 + 5) % 256);
    return s;
  endfunction

  int checks = 0;
  int failures = 0;
  // How often each mechanism was exercised.
  int n_iv_nosalt = 0, n_iv_salt = 0, n_empty = 0, n_padded = 0, n_exact = 0;
  int n_multi = 0, n_stall = 0, n_trunc = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  always @(posedge clk) if (blk_ready && !blk_valid && busy) n_stall++;

  task automatic run_case(int idx, bit stall);
    int nblk;
    int cycles;
    int t0;
    logic [63:0] l;
    l    = case_len[idx];
    nblk = int'((l + BLOCK_W - 1) / BLOCK_W);
    @(negedge clk);
    msg_len  = l;
    use_salt = case_salt[idx];
    salt     = case_salt[idx] ? salt_pattern() : '1;  // ignored without salt
    start    = 1'b1;
    t0       = cyc;  // cycle in which start is high
    @(negedge clk);
    start = 1'b0;
    for (int k = 0; k < nblk; k++) begin
      blk_data = msg_block(k);
      if (stall) begin
        while (!blk_ready) @(negedge clk);
        repeat (3) @(negedge clk);
      end
      blk_valid = 1'b1;
      while (!blk_ready) @(negedge clk);
      @(negedge clk);  // taken at the rising edge in between
      blk_valid = 1'b0;
      blk_data  = '0;
    end
    while (!digest_valid) @(negedge clk);
    cycles = cyc - t0;
    checks++;
    if (digest !== case_exp[idx][DIGEST_BITS-1:0]) begin
      failures++;
      $display("FAIL case %0d (n=%0d l=%0d salt=%0b): digest %h expected %h",
               idx, DIGEST_BITS, l, case_salt[idx], digest, case_exp[idx][DIGEST_BITS-1:0]);
    end
    if (!stall) begin
      checks++;
      if (cycles != (CLAT + 1) * (nblk + 2)) begin
        failures++;
        $display("FAIL case %0d: %0d cycles, expected %0d", idx, cycles, (CLAT + 1) * (nblk + 2));
      end
    end
    if (case_salt[idx]) n_iv_salt++; else n_iv_nosalt++;
    if (l == 0) n_empty++;
    else if (l % BLOCK_W == 0) n_exact++;
    else n_padded++;
    if (nblk >= 2) n_multi++;
    if (DIGEST_BITS < STATE_W) n_trunc++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NCASE; i++) run_case(i, 1'b0);
    // Again with a gap before each block, so the design waits for input.
    for (int i = 0; i < NCASE; i++) run_case(i, 1'b1);
    checks++;
    if (n_iv_nosalt == 0 || n_iv_salt == 0 || n_empty == 0 || n_padded == 0 || n_exact == 0 ||
        n_multi == 0 || n_stall == 0 || ((DIGEST_BITS < (STATE_W)) && n_trunc == 0)) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("mechanisms: iv_nosalt=%0d iv_salt=%0d empty=%0d padded_last=%0d exact_multiple=%0d multi_block=%0d input_stall_cycles=%0d truncation=%0d",
             n_iv_nosalt, n_iv_salt, n_empty, n_padded, n_exact, n_multi, n_stall, n_trunc);
    fin = 1'b1;
  end
endmodule
