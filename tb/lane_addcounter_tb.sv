// lane_addcounter_tb: AddCounter on the 256-bit and 512-bit states. For even
// rounds the upper counter word c0 and for odd rounds the lower word c1 must
// be XORed into column 3 (the fourth column of the first AES state); every
// other column must pass unchanged.
module lane_addcounter_tb;
  logic [255:0] x256, y256;
  logic [511:0] x512, y512;
  logic [63:0]  c;
  logic         r_odd;
  int checks = 0;
  int failures = 0;

  lane_addcounter #(.STATE_W(256)) dut256 (.x_in(x256), .counter(c), .r_odd(r_odd), .x_out(y256));
  lane_addcounter #(.STATE_W(512)) dut512 (.x_in(x512), .counter(c), .r_odd(r_odd), .x_out(y512));

  function automatic logic [31:0] col(logic [511:0] v, int w, int j);
    return v[w - 1 - 32 * j -: 32];
  endfunction

  initial begin
    logic [31:0] cw;
    for (int t = 0; t < 40; t++) begin
      for (int w = 0; w < 16; w++) x512[32 * w +: 32] = $urandom;
      x256  = x512[511:256];
      c     = {$urandom, $urandom};
      r_odd = t[0];
      cw    = r_odd ? c[31:0] : c[63:32];
      #1;
      for (int j = 0; j < 16; j++) begin
        checks++;
        if (col(y512, 512, j) !== (col(x512, 512, j) ^ ((j == 3) ? cw : 32'h0))) begin
          failures++;
          $display("FAIL 512 column %0d odd=%0b", j, r_odd);
        end
      end
      for (int j = 0; j < 8; j++) begin
        checks++;
        if (col({256'b0, y256}, 256, j) !== (col({256'b0, x256}, 256, j) ^ ((j == 3) ? cw : 32'h0))) begin
          failures++;
          $display("FAIL 256 column %0d odd=%0b", j, r_odd);
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
