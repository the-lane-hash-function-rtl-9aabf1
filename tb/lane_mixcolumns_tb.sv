// lane_mixcolumns_tb: MixColumns on the 256-bit and 512-bit states. Known
// AES column pairs (db135345 -> 8e4da1bc, f20a225c -> 9fdc589d,
// 2d26314c -> 4d7ebdf8, d4d4d4d5 -> d5d5d7d6, and the fixed points 01010101,
// c6c6c6c6) are placed in the columns, then random states are compared with
// the matrix product computed by long-hand GF(2^8) multiplication.
module lane_mixcolumns_tb;
  import lane_tb_ref::*;

  logic [255:0] x256, y256;
  logic [511:0] x512, y512;
  int checks = 0;
  int failures = 0;

  lane_mixcolumns #(.STATE_W(256)) dut256 (.x_in(x256), .x_out(y256));
  lane_mixcolumns #(.STATE_W(512)) dut512 (.x_in(x512), .x_out(y512));

  localparam logic [31:0] KIN  [8] = '{32'hdb135345, 32'hf20a225c, 32'h2d26314c, 32'hd4d4d4d5,
                                       32'h01010101, 32'hc6c6c6c6, 32'hf20a225c, 32'hdb135345};
  localparam logic [31:0] KOUT [8] = '{32'h8e4da1bc, 32'h9fdc589d, 32'h4d7ebdf8, 32'hd5d5d7d6,
                                       32'h01010101, 32'hc6c6c6c6, 32'h9fdc589d, 32'h8e4da1bc};
  localparam logic [7:0] MAT [4][4] = '{'{8'h02, 8'h03, 8'h01, 8'h01}, '{8'h01, 8'h02, 8'h03, 8'h01},
                                        '{8'h01, 8'h01, 8'h02, 8'h03}, '{8'h03, 8'h01, 8'h01, 8'h02}};

  function automatic logic [31:0] ref_col(logic [31:0] c);
    logic [31:0] o;
    for (int r = 0; r < 4; r++) begin
      o[31 - 8 * r -: 8] = '0;
      for (int k = 0; k < 4; k++) o[31 - 8 * r -: 8] ^= ref_mul(MAT[r][k], c[31 - 8 * k -: 8]);
    end
    return o;
  endfunction

  initial begin
    for (int j = 0; j < 8; j++) begin
      x256[255 - 32 * j -: 32] = KIN[j];
      x512[511 - 32 * j -: 32] = KIN[j];
      x512[255 - 32 * j -: 32] = KIN[7 - j];
    end
    #1;
    for (int j = 0; j < 8; j++) begin
      checks++;
      if (y256[255 - 32 * j -: 32] !== KOUT[j] || y512[511 - 32 * j -: 32] !== KOUT[j] ||
          y512[255 - 32 * j -: 32] !== KOUT[7 - j]) begin
        failures++;
        $display("FAIL known column %0d: %h", j, y256[255 - 32 * j -: 32]);
      end
    end
    for (int t = 0; t < 30; t++) begin
      for (int w = 0; w < 16; w++) x512[32 * w +: 32] = $urandom;
      x256 = x512[511:256] ^ x512[255:0];
      #1;
      for (int j = 0; j < 16; j++) begin
        checks++;
        if (y512[32 * j +: 32] !== ref_col(x512[32 * j +: 32])) begin
          failures++;
          $display("FAIL 512 column %0d", j);
        end
      end
      for (int j = 0; j < 8; j++) begin
        checks++;
        if (y256[32 * j +: 32] !== ref_col(x256[32 * j +: 32])) begin
          failures++;
          $display("FAIL 256 column %0d", j);
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
