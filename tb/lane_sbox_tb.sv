// lane_sbox_tb: checks the S-box against the first 32 entries of the
// published AES S-box table and two further known entries, then checks that
// it is a permutation of the 256 byte values without fixed points (a ^ S(a)
// never 00) and without opposite fixed points (a ^ S(a) never ff), as the
// AES S-box is built to be.
module lane_sbox_tb;
  logic [7:0] a;
  logic [7:0] y;
  int checks = 0;
  int failures = 0;

  lane_sbox dut (.a(a), .y(y));

  // AES S-box entries 00..1f, and entries 53 and ff.
  localparam logic [255:0] ROW01 =
    256'h637c777bf26b6fc53001672bfed7ab76_ca82c97dfa5947f0add4a2af9ca472c0;

  task automatic expect_byte(logic [7:0] in, logic [7:0] exp);
    a = in;
    #1;
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL S(%h) = %h, expected %h", in, y, exp);
    end
  endtask

  initial begin
    logic [255:0] seen;
    for (int i = 0; i < 32; i++) expect_byte(8'(i), ROW01[255 - 8 * i -: 8]);
    expect_byte(8'h53, 8'hed);
    expect_byte(8'hff, 8'h16);
    seen = '0;
    for (int i = 0; i < 256; i++) begin
      a = 8'(i);
      #1;
      checks++;
      if (seen[y] || y == 8'(i) || y == ~8'(i)) begin
        failures++;
        $display("FAIL S(%h) = %h repeats or is a (opposite) fixed point", a, y);
      end
      seen[y] = 1'b1;
    end
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
