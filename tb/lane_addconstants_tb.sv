// lane_addconstants_tb: AddConstants on the 256-bit and 512-bit states. The
// constants of round r (k_{NCOL*r+j} into column j, from a step-by-step LFSR
// model) are applied to random states for several r, and every column is
// compared with column XOR constant.
module lane_addconstants_tb;
  import lane_tb_ref::*;

  logic [255:0] x256, k256, y256;
  logic [511:0] x512, k512, y512;
  int checks = 0;
  int failures = 0;

  lane_addconstants #(.STATE_W(256)) dut256 (.x_in(x256), .k_in(k256), .x_out(y256));
  lane_addconstants #(.STATE_W(512)) dut512 (.x_in(x512), .k_in(k512), .x_out(y512));

  initial begin
    for (int r = 0; r < 34; r += 3) begin
      for (int w = 0; w < 16; w++) x512[32 * w +: 32] = $urandom;
      x256 = x512[511:256];
      for (int j = 0; j < 8; j++) k256[255 - 32 * j -: 32] = ref_k(8 * r + j);
      for (int j = 0; j < 16; j++) k512[511 - 32 * j -: 32] = ref_k(16 * r + j);
      #1;
      for (int j = 0; j < 8; j++) begin
        checks++;
        if (y256[255 - 32 * j -: 32] !== (x256[255 - 32 * j -: 32] ^ ref_k(8 * r + j))) begin
          failures++;
          $display("FAIL 256 r=%0d column %0d", r, j);
        end
      end
      for (int j = 0; j < 16; j++) begin
        checks++;
        if (y512[511 - 32 * j -: 32] !== (x512[511 - 32 * j -: 32] ^ ref_k(16 * r + j))) begin
          failures++;
          $display("FAIL 512 r=%0d column %0d", r, j);
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
