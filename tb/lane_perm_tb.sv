// lane_perm_tb: permutation lanes P0, P3, Q0 and Q1 of both state sizes
// (Lane-256: 5 or 2 full rounds, Lane-512: 7 or 3), all started together on
// the input string (13*i + 5) mod 256 with counter 0123456789abcdef. Each
// lane must raise done exactly FULL_ROUNDS+1 cycles after the start cycle,
// be busy until then, and hold the output of an independent software model.
// The lanes are started a second time, the first time after a run on other
// data, to show that start reloads them.
module lane_perm_tb;
  import lane_tb_ref::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic [63:0] c = 64'h0123456789abcdef;
  logic [31:0] junk = 32'h0;
  int checks = 0;
  int failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;

  logic [255:0] y0;
  logic b0, d0;
  lane_perm #(.STATE_W(256), .FULL_ROUNDS(5), .R_BASE(0)) dut0 (
    .clk(clk), .rst_n(rst_n), .start(start), .x_in(pattern(32, 13)[255:0] ^ 256'(junk)), .c_in(c),
    .busy(b0), .done(d0), .x_out(y0));
  logic [255:0] y1;
  logic b1, d1;
  lane_perm #(.STATE_W(256), .FULL_ROUNDS(5), .R_BASE(15)) dut1 (
    .clk(clk), .rst_n(rst_n), .start(start), .x_in(pattern(32, 13)[255:0] ^ 256'(junk)), .c_in(c),
    .busy(b1), .done(d1), .x_out(y1));
  logic [255:0] y2;
  logic b2, d2;
  lane_perm #(.STATE_W(256), .FULL_ROUNDS(2), .R_BASE(30)) dut2 (
    .clk(clk), .rst_n(rst_n), .start(start), .x_in(pattern(32, 13)[255:0] ^ 256'(junk)), .c_in(c),
    .busy(b2), .done(d2), .x_out(y2));
  logic [255:0] y3;
  logic b3, d3;
  lane_perm #(.STATE_W(256), .FULL_ROUNDS(2), .R_BASE(32)) dut3 (
    .clk(clk), .rst_n(rst_n), .start(start), .x_in(pattern(32, 13)[255:0] ^ 256'(junk)), .c_in(c),
    .busy(b3), .done(d3), .x_out(y3));
  logic [511:0] y4;
  logic b4, d4;
  lane_perm #(.STATE_W(512), .FULL_ROUNDS(7), .R_BASE(0)) dut4 (
    .clk(clk), .rst_n(rst_n), .start(start), .x_in(pattern(64, 13)[511:0] ^ 512'(junk)), .c_in(c),
    .busy(b4), .done(d4), .x_out(y4));
  logic [511:0] y5;
  logic b5, d5;
  lane_perm #(.STATE_W(512), .FULL_ROUNDS(7), .R_BASE(21)) dut5 (
    .clk(clk), .rst_n(rst_n), .start(start), .x_in(pattern(64, 13)[511:0] ^ 512'(junk)), .c_in(c),
    .busy(b5), .done(d5), .x_out(y5));
  logic [511:0] y6;
  logic b6, d6;
  lane_perm #(.STATE_W(512), .FULL_ROUNDS(3), .R_BASE(42)) dut6 (
    .clk(clk), .rst_n(rst_n), .start(start), .x_in(pattern(64, 13)[511:0] ^ 512'(junk)), .c_in(c),
    .busy(b6), .done(d6), .x_out(y6));
  logic [511:0] y7;
  logic b7, d7;
  lane_perm #(.STATE_W(512), .FULL_ROUNDS(3), .R_BASE(45)) dut7 (
    .clk(clk), .rst_n(rst_n), .start(start), .x_in(pattern(64, 13)[511:0] ^ 512'(junk)), .c_in(c),
    .busy(b7), .done(d7), .x_out(y7));

  // Cycle number at which each lane's done was seen, per run.
  int done_at [8];

  task automatic check_lane(int i, int f, logic d, logic b, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL lane %0d output", i);
    end
  endtask

  initial begin
    int t0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 2; run++) begin
      junk = (run == 0) ? 32'hdeadbeef : 32'h0;
      @(negedge clk);
      start = 1'b1;
      t0 = cyc;
      @(negedge clk);
      start = 1'b0;
      for (int k = 1; k <= 9; k++) begin
        // at this point k rising edges have passed since the start cycle
        checks++; if ((d0 !== (k == 6)) || (b0 !== (k <= 5))) begin failures++; $display("FAIL lane 0 timing at cycle %0d", k); end
        checks++; if ((d1 !== (k == 6)) || (b1 !== (k <= 5))) begin failures++; $display("FAIL lane 1 timing at cycle %0d", k); end
        checks++; if ((d2 !== (k == 3)) || (b2 !== (k <= 2))) begin failures++; $display("FAIL lane 2 timing at cycle %0d", k); end
        checks++; if ((d3 !== (k == 3)) || (b3 !== (k <= 2))) begin failures++; $display("FAIL lane 3 timing at cycle %0d", k); end
        checks++; if ((d4 !== (k == 8)) || (b4 !== (k <= 7))) begin failures++; $display("FAIL lane 4 timing at cycle %0d", k); end
        checks++; if ((d5 !== (k == 8)) || (b5 !== (k <= 7))) begin failures++; $display("FAIL lane 5 timing at cycle %0d", k); end
        checks++; if ((d6 !== (k == 4)) || (b6 !== (k <= 3))) begin failures++; $display("FAIL lane 6 timing at cycle %0d", k); end
        checks++; if ((d7 !== (k == 4)) || (b7 !== (k <= 3))) begin failures++; $display("FAIL lane 7 timing at cycle %0d", k); end
        @(negedge clk);
      end
      if (run == 1) begin
      check_lane(0, 5, d0, b0, y0 === 256'hb63439196dc63bedc855b09a8237690d421eddefeccb738f8b836ace17c6c445);
      check_lane(1, 5, d1, b1, y1 === 256'h2ba35c04afb5de2e48daf5b9649f83f9b23a69fc07a80b6a685c8ce9fa76d28d);
      check_lane(2, 2, d2, b2, y2 === 256'h35c25a526ddd263e2d3ad415a5a8ab67b93d6aa2b429af39e02687221a517f88);
      check_lane(3, 2, d3, b3, y3 === 256'h60084d241baf88b90a0c5148698ea664879ec47f01e86bc5977de641ea1486c7);
      check_lane(4, 7, d4, b4, y4 === 512'h2ae1c4fd6e39cf860a1bfe2aa4ee21faf5b3d05722b63eda390d1ddf87b697707275c80a2872546cc7c72625ba5f11d64fc466ec070494dd59cfbaed0ef4ee78);
      check_lane(5, 7, d5, b5, y5 === 512'h33d380f90cfa05457cac5e699aa821fc38fbd35edd4466838e70230b5dc097d340fa984d24db1bbd15a768e8dcc1dc93c5e724c05bacbecb79d7adfc1ccda9d8);
      check_lane(6, 3, d6, b6, y6 === 512'hc7369670ccace60cae948647c81ef343dd6087dfb7c14b6c0c6a681c3eafce9f4d5d7f5ffd285bd0108aef00d80b6bb9d08c07dc8001d5b057d9950d5e848957);
      check_lane(7, 3, d7, b7, y7 === 512'h0fa9ae5d44bdd97c7dd12a8725ee1e4f5183d6199b29a9b61349e1077f183a7ad3bd36186e4abf372214439125cb3518844a6be43ad5a88ce82a2b5b6a11530c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc++;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
