// lane_const_gen_tb: constant generators for Lane-256 lane P1 (first
// constant k_40) and Lane-512 lane Q1 (first constant k_720). After load the
// outputs must show the first round's constants in the load cycle, advance by
// one round (8 or 16 constants) per adv, hold without adv, and restart on a
// new load. Expected constants come from a step-by-step LFSR model that
// starts at k0 = 07fc703d; k0 and k1 are also checked directly.
module lane_const_gen_tb;
  import lane_tb_ref::*;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         load = 1'b0;
  logic         adv = 1'b0;
  logic [255:0] k256;
  logic [511:0] k512;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  lane_const_gen #(.STATE_W(256), .FIRST_IDX(40))  dut256 (.clk(clk), .rst_n(rst_n), .load(load), .adv(adv), .k_out(k256));
  lane_const_gen #(.STATE_W(512), .FIRST_IDX(720)) dut512 (.clk(clk), .rst_n(rst_n), .load(load), .adv(adv), .k_out(k512));
  logic [255:0] k0gen;
  lane_const_gen #(.STATE_W(256), .FIRST_IDX(0))   dut0 (.clk(clk), .rst_n(rst_n), .load(load), .adv(adv), .k_out(k0gen));

  task automatic expect_round(int rnd);
    for (int j = 0; j < 8; j++) begin
      checks++;
      if (k256[255 - 32 * j -: 32] !== ref_k(40 + 8 * rnd + j)) begin
        failures++;
        $display("FAIL 256 round %0d constant %0d: %h expected %h", rnd, j, k256[255 - 32 * j -: 32], ref_k(40 + 8 * rnd + j));
      end
    end
    for (int j = 0; j < 16; j++) begin
      checks++;
      if (k512[511 - 32 * j -: 32] !== ref_k(720 + 16 * rnd + j)) begin
        failures++;
        $display("FAIL 512 round %0d constant %0d", rnd, j);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int pass = 0; pass < 2; pass++) begin
      @(negedge clk);
      load = 1'b1;
      #1;
      expect_round(0);
      checks++;
      if (k0gen[255 -: 64] !== {32'h07fc703d, 32'hd3fe381f}) begin
        failures++;
        $display("FAIL k0 k1 = %h", k0gen[255 -: 64]);
      end
      @(negedge clk);
      load = 1'b0;
      for (int rnd = 1; rnd < 5; rnd++) begin
        #1;
        expect_round(rnd);
        // one idle cycle without adv must not move the generator
        @(negedge clk);
        #1;
        expect_round(rnd);
        adv = 1'b1;
        @(negedge clk);
        adv = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
