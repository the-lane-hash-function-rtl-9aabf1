// lane_msg_exp_tb: message expansion for both state sizes. Each half of each
// expanded word is described by a 6-bit selection over (h0, h1, m0, m1, m2,
// m3), taken from the expansion equations, and random inputs are compared
// with the XOR of the selected parts.
module lane_msg_exp_tb;
  logic [255:0]          h256;
  logic [511:0]          m256;
  logic [5:0][255:0]     w256;
  logic [511:0]          h512;
  logic [1023:0]         m512;
  logic [5:0][511:0]     w512;
  int checks = 0;
  int failures = 0;

  lane_msg_exp #(.STATE_W(256)) dut256 (.h_in(h256), .m_in(m256), .w_out(w256));
  lane_msg_exp #(.STATE_W(512)) dut512 (.h_in(h512), .m_in(m512), .w_out(w512));

  // Selection bits, MSB first: h0 h1 m0 m1 m2 m3. SEL[j][0] is the left half of W_j.
  localparam logic [5:0] SEL [6][2] = '{
    '{6'b101111, 6'b011010},
    '{6'b111011, 6'b100110},
    '{6'b111110, 6'b101001},
    '{6'b100000, 6'b010000},
    '{6'b001000, 6'b000100},
    '{6'b000010, 6'b000001}};

  function automatic logic [255:0] half(logic [5:0] s, logic [255:0] p [6]);
    logic [255:0] r;
    r = '0;
    for (int i = 0; i < 6; i++) if (s[5 - i]) r ^= p[i];
    return r;
  endfunction

  initial begin
    logic [255:0] p [6];
    for (int t = 0; t < 30; t++) begin
      for (int i = 0; i < 32; i++) m512[32 * i +: 32] = $urandom;
      for (int i = 0; i < 16; i++) h512[32 * i +: 32] = $urandom;
      m256 = m512[1023:512];
      h256 = h512[255:0];
      #1;
      // 512-bit state: 256-bit parts
      p[0] = h512[511:256]; p[1] = h512[255:0];
      for (int i = 0; i < 4; i++) p[2 + i] = m512[1023 - 256 * i -: 256];
      for (int j = 0; j < 6; j++) begin
        checks++;
        if (w512[j] !== {half(SEL[j][0], p), half(SEL[j][1], p)}) begin
          failures++;
          $display("FAIL 512 W%0d", j);
        end
      end
      // 256-bit state: 128-bit parts
      p[0] = 256'(h256[255:128]); p[1] = 256'(h256[127:0]);
      for (int i = 0; i < 4; i++) p[2 + i] = 256'(m256[511 - 128 * i -: 128]);
      for (int j = 0; j < 6; j++) begin
        checks++;
        if (w256[j] !== {half(SEL[j][0], p)[127:0], half(SEL[j][1], p)[127:0]}) begin
          failures++;
          $display("FAIL 256 W%0d", j);
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
