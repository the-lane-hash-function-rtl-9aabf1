// lane_swapcolumns_tb: SwapColumns on the 256-bit and 512-bit states. Column
// j of the input is filled with a tag word and the output order is compared
// with x0 x1 x4 x5 x2 x3 x6 x7 (256-bit) and x0 x4 x8 x12 x1 x5 x9 x13 x2 x6
// x10 x14 x3 x7 x11 x15 (512-bit); random states follow.
module lane_swapcolumns_tb;
  logic [255:0] x256, y256;
  logic [511:0] x512, y512;
  int checks = 0;
  int failures = 0;

  lane_swapcolumns #(.STATE_W(256)) dut256 (.x_in(x256), .x_out(y256));
  lane_swapcolumns #(.STATE_W(512)) dut512 (.x_in(x512), .x_out(y512));

  localparam int ORD8  [8]  = '{0, 1, 4, 5, 2, 3, 6, 7};
  localparam int ORD16 [16] = '{0, 4, 8, 12, 1, 5, 9, 13, 2, 6, 10, 14, 3, 7, 11, 15};

  initial begin
    for (int t = 0; t < 21; t++) begin
      for (int j = 0; j < 16; j++)
        x512[511 - 32 * j -: 32] = (t == 0) ? 32'(32'hc0de0000 + j) : $urandom;
      x256 = x512[255:0];
      #1;
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (y256[255 - 32 * i -: 32] !== x256[255 - 32 * ORD8[i] -: 32]) begin
          failures++;
          $display("FAIL 256 output column %0d", i);
        end
      end
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (y512[511 - 32 * i -: 32] !== x512[511 - 32 * ORD16[i] -: 32]) begin
          failures++;
          $display("FAIL 512 output column %0d", i);
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
