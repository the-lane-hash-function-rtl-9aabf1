// lane_hash_tb: end-to-end test of lane_hash at its default size (Lane-256).
// Hashes messages of 0, 5, 512, 1024, 1000, 1537 and 3000 bits, with and
// without salt, first with blocks offered at once (checking the digest and the
// cycle count 10*(k+2) for k blocks) and then with a gap before every
// block (checking the digest while the design waits for input). The expected
// digests come from an independent software model of Lane. It counts how often
// each mechanism occurred: IV derivation with and without salt, empty message,
// zero-padded last block, message of whole blocks, multi-block chaining and
// waiting for input.
module lane_hash_tb;
  localparam int unsigned DIGEST_BITS = 256;

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

  lane_hash dut (
    .clk(clk), .rst_n(rst_n), .start(start), .msg_len(msg_len), .use_salt(use_salt), .salt(salt),
    .blk_valid(blk_valid), .blk_ready(blk_ready), .blk_data(blk_data), .busy(busy),
    .digest_valid(digest_valid), .digest(digest));

  logic [63:0]            case_len  [NCASE];
  logic                   case_salt [NCASE];
  logic [DIGEST_BITS-1:0] case_exp  [NCASE];

  initial begin
    case_len[0] = 64'd0; case_salt[0] = 1'b0; case_exp[0] = 256'h39d0a057848d3b41a1539a9d1fb843d95c7cac409bdd2597655542584eda637b;
    case_len[1] = 64'd5; case_salt[1] = 1'b0; case_exp[1] = 256'h69baf8001a4f3caae0a04b2381517578ffd3a24dc863a209c70868420347b789;
    case_len[2] = 64'd512; case_salt[2] = 1'b0; case_exp[2] = 256'h3059b118909314687e4277350294c8e37fd82dc5cf2b3a30d3541d77da8e4b13;
    case_len[3] = 64'd1024; case_salt[3] = 1'b0; case_exp[3] = 256'h0e045d12ff5027ddfc146a3fb905518a1b76787cc8a218b503a31f0d5189ab73;
    case_len[4] = 64'd1000; case_salt[4] = 1'b1; case_exp[4] = 256'hb657a6fed3c522120f838616dbf36f3c673de4a924cac0df2130ef8dbb837185;
    case_len[5] = 64'd1537; case_salt[5] = 1'b1; case_exp[5] = 256'h15ad9fab5b12180a0e55d206faec22b728df45a24fa73f8fad9c6058827628b6;
    case_len[6] = 64'd0; case_salt[6] = 1'b1; case_exp[6] = 256'he61f48d4539a06aac82ea95fe35e6189083ea28fd55df5d6816e00584979dcf3;
    case_len[7] = 64'd3000; case_salt[7] = 1'b0; case_exp[7] = 256'h882f525967945ed130c8935317200a219826685e32949eeaac3d5382a3abd549;
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
    if (digest !== case_exp[idx]) begin
      failures++;
      $display("FAIL case %0d (n=%0d l=%0d salt=%0b): digest %h expected %h",
               idx, DIGEST_BITS, l, case_salt[idx], digest, case_exp[idx]);
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
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
