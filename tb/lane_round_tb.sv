// lane_round_tb: one Lane round on the 256-bit and 512-bit states, for full
// rounds r = 1 (odd, counter word c1) and r = 6 (even, counter word c0) and
// for a last round. The input is the byte string (13*i + 5) mod 256, the
// counter 0123456789abcdef, the constants come from a step-by-step LFSR
// model, and the expected states from an independent software model of Lane.
module lane_round_tb;
  import lane_tb_ref::*;

  logic [255:0] x256, k256, y256;
  logic [511:0] x512, k512, y512;
  logic [63:0]  c = 64'h0123456789abcdef;
  logic         r_odd, last;
  int checks = 0;
  int failures = 0;

  lane_round #(.STATE_W(256)) dut256 (.x_in(x256), .k_in(k256), .counter(c), .r_odd(r_odd), .last(last), .x_out(y256));
  lane_round #(.STATE_W(512)) dut512 (.x_in(x512), .k_in(k512), .counter(c), .r_odd(r_odd), .last(last), .x_out(y512));

  task automatic run(int r, bit lst, logic [255:0] e256, logic [511:0] e512);
    for (int j = 0; j < 8; j++) k256[255 - 32 * j -: 32] = ref_k(8 * r + j);
    for (int j = 0; j < 16; j++) k512[511 - 32 * j -: 32] = ref_k(16 * r + j);
    r_odd = r[0];
    last  = lst;
    #1;
    checks++;
    if (y256 !== e256) begin
      failures++;
      $display("FAIL 256 r=%0d last=%0b: %h expected %h", r, lst, y256, e256);
    end
    checks++;
    if (y512 !== e512) begin
      failures++;
      $display("FAIL 512 r=%0d last=%0b: %h expected %h", r, lst, y512, e512);
    end
  endtask

  initial begin
    x256 = pattern(32, 13)[255:0];
    x512 = pattern(64, 13)[511:0];
    run(1, 1'b0, 256'h44e9c04a5b1a6add4c184753a15e5970c79dd7c6fe626e566c2be2bdf0667d3e, 512'hfaeddbc7b9f806ea78b6272539f5d4abd418671a0bae79ad0f34c9a082b53ba1501cd124e953f2d2dadd357a4d923236b5a2ed2762da7508bb753ae9068dbb99);
    run(6, 1'b0, 256'h0b6be46e7cdb78cff0e065102f224850d47d5ecfaf1aa25b2b15ea2dd3f97976, 512'h15fb568c7d096e3f5af931a8c5d125c2739321beb9d6cdc6ce1342e72ca7431403d97276606fa8e66a4ef0d8ca9b0e6d14c8b40626445812e33cd838950925b5);
    run(4, 1'b1, 256'hc70e3c3bcae994e4d2263895ee4166935f6428dbebb55c369ba47d4d8ba1b2c6, 512'hc70e3c3bd22638950c0bc4c29cbe0a94cae994e4ee416693e56a38520010d4bf5f6428db9ba47d4daff24d830cc0c5b9ebb55c368ba1b2c651e28694f624c05f);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
