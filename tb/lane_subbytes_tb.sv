// lane_subbytes_tb: SubBytes on the 256-bit and 512-bit states. Random states
// are compared byte by byte with an S-box found by exhaustive inverse search,
// plus the all-zero state, which must become all 63.
module lane_subbytes_tb;
  import lane_tb_ref::*;

  logic [255:0] x256, y256;
  logic [511:0] x512, y512;
  logic [7:0]   tbl [256];
  int checks = 0;
  int failures = 0;

  lane_subbytes #(.STATE_W(256)) dut256 (.x_in(x256), .x_out(y256));
  lane_subbytes #(.STATE_W(512)) dut512 (.x_in(x512), .x_out(y512));

  initial begin
    logic [511:0] e512;
    for (int v = 0; v < 256; v++) tbl[v] = ref_sbox(8'(v));
    x256 = '0;
    x512 = '0;
    #1;
    checks++;
    if (y256 !== {32{8'h63}} || y512 !== {64{8'h63}}) begin
      failures++;
      $display("FAIL zero state");
    end
    for (int t = 0; t < 50; t++) begin
      for (int w = 0; w < 16; w++) x512[32 * w +: 32] = $urandom;
      x256 = x512[255:0] ^ x512[511:256];
      #1;
      for (int i = 0; i < 64; i++) e512[8 * i +: 8] = tbl[x512[8 * i +: 8]];
      checks++;
      if (y512 !== e512) begin
        failures++;
        $display("FAIL 512: in %h out %h expected %h", x512, y512, e512);
      end
      for (int i = 0; i < 32; i++) begin
        checks++;
        if (y256[8 * i +: 8] !== tbl[x256[8 * i +: 8]]) begin
          failures++;
          $display("FAIL 256 byte %0d", i);
        end
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
