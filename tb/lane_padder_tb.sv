// lane_padder_tb: padding and counter for 512-bit blocks. For several message
// lengths l and block positions it checks that bits of the block past the end
// of the message are cleared and the others kept, that the counter is
// min(bits_done + 512, l), and that last marks the block reaching l.
module lane_padder_tb;
  logic [511:0] d_in, d_out;
  logic [63:0]  done_bits, len, cnt;
  logic         last;
  int checks = 0;
  int failures = 0;

  lane_padder #(.BLOCK_W(512)) dut (.data_in(d_in), .bits_done(done_bits), .msg_len(len),
                                    .data_out(d_out), .counter(cnt), .last(last));

  task automatic try(logic [63:0] l, logic [63:0] bd);
    logic [63:0] rem;
    logic [511:0] e;
    for (int i = 0; i < 16; i++) d_in[32 * i +: 32] = $urandom | 32'h80000001;
    len = l;
    done_bits = bd;
    #1;
    rem = l - bd;
    for (int i = 0; i < 512; i++) e[511 - i] = (64'(i) < rem) ? d_in[511 - i] : 1'b0;
    checks++;
    if (d_out !== e) begin
      failures++;
      $display("FAIL data l=%0d done=%0d", l, bd);
    end
    checks++;
    if (cnt !== ((rem > 512) ? bd + 512 : l) || last !== (rem <= 512)) begin
      failures++;
      $display("FAIL counter/last l=%0d done=%0d: %0d %b", l, bd, cnt, last);
    end
  endtask

  initial begin
    try(5, 0);
    try(1, 0);
    try(511, 0);
    try(512, 0);
    try(1024, 0);
    try(1024, 512);
    try(1000, 512);
    try(1537, 1024);
    try(1537, 1536);
    try(64'h0000_0100_0000_0007, 64'h0000_00ff_ffff_fe00);
    try(64'hffff_ffff_ffff_ffff, 64'h0000_0000_0000_0000);
    try(64'hffff_ffff_ffff_ffff, 64'hffff_ffff_ffff_fe00);
    for (int t = 0; t < 50; t++) try(64'($urandom_range(1, 4000)) + 64'd600, 64'd512 * 64'($urandom_range(0, 1)));
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
