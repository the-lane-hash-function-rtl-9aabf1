// lane_shiftrows_tb: ShiftRows on the 256-bit and 512-bit states. Bytes are
// numbered as in the AES, y_n at row n mod 4 of column n / 4. The AES state
// 00 01 .. 0f must become 00 05 0a 0f 04 09 0e 03 08 0d 02 07 0c 01 06 0b in
// every AES state of the Lane state; random states are checked against that
// rule written as an index table.
module lane_shiftrows_tb;
  logic [255:0] x256, y256;
  logic [511:0] x512, y512;
  int checks = 0;
  int failures = 0;

  lane_shiftrows #(.STATE_W(256)) dut256 (.x_in(x256), .x_out(y256));
  lane_shiftrows #(.STATE_W(512)) dut512 (.x_in(x512), .x_out(y512));

  // Output byte n of an AES state takes input byte SRC[n].
  localparam int SRC [16] = '{0, 5, 10, 15, 4, 9, 14, 3, 8, 13, 2, 7, 12, 1, 6, 11};

  function automatic logic [7:0] byte_at(logic [511:0] v, int w, int n);
    return v[w - 8 - 8 * n +: 8];
  endfunction

  task automatic check(int w);
    logic [511:0] xi, yo;
    xi = (w == 256) ? {256'b0, x256} : x512;
    yo = (w == 256) ? {256'b0, y256} : y512;
    for (int a = 0; a < w / 128; a++)
      for (int n = 0; n < 16; n++) begin
        checks++;
        if (byte_at(yo, w, 16 * a + n) !== byte_at(xi, w, 16 * a + SRC[n])) begin
          failures++;
          $display("FAIL %0d-bit state, AES state %0d byte %0d", w, a, n);
        end
      end
  endtask

  initial begin
    for (int i = 0; i < 64; i++) x512[511 - 8 * i -: 8] = 8'(i % 16);
    x256 = x512[511:256];
    #1;
    checks++;
    if (y256[255:128] !== 128'h00050a0f04090e03080d02070c01060b ||
        y512[127:0] !== 128'h00050a0f04090e03080d02070c01060b) begin
      failures++;
      $display("FAIL AES example: %h", y256);
    end
    for (int t = 0; t < 20; t++) begin
      for (int w = 0; w < 16; w++) x512[32 * w +: 32] = $urandom;
      x256 = x512[383:128];
      #1;
      check(256);
      check(512);
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
