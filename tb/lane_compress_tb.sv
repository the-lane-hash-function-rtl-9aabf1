// lane_compress_tb: the compression function for both state sizes.
// H is the byte string (29*i + 5) mod 256, M the string (71*i + 5) mod 256,
// C = 0123456789abcdef; a second call uses H = 0 and C = 0. Results are
// compared with an independent software model of Lane, and done must come
// exactly 9 (256-bit) and 12 (512-bit) cycles after the start cycle.
module lane_compress_tb;
  import lane_tb_ref::*;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         start = 1'b0;
  logic         zero = 1'b0;
  logic [63:0]  c;
  logic [255:0] h256;
  logic [511:0] h512;
  logic         busy256, done256, busy512, done512;
  logic [255:0] o256;
  logic [511:0] o512;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  always_comb begin
    c    = zero ? 64'h0 : 64'h0123456789abcdef;
    h256 = zero ? '0 : pattern(32, 29)[255:0];
    h512 = zero ? '0 : pattern(64, 29)[511:0];
  end

  lane_compress #(.STATE_W(256)) dut256 (.clk(clk), .rst_n(rst_n), .start(start), .h_in(h256),
    .m_in(pattern(64, 71)[511:0]), .c_in(c), .busy(busy256), .done(done256), .h_out(o256));
  lane_compress #(.STATE_W(512)) dut512 (.clk(clk), .rst_n(rst_n), .start(start), .h_in(h512),
    .m_in(pattern(128, 71)), .c_in(c), .busy(busy512), .done(done512), .h_out(o512));

  task automatic call(bit z, logic [255:0] e256, logic [511:0] e512);
    @(negedge clk);
    zero  = z;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    zero  = !z;  // inputs are only sampled in the start cycle
    for (int k = 1; k <= 12; k++) begin
      checks++;
      if (done256 !== (k == 9) || done512 !== (k == 12) || busy256 !== (k < 9) || busy512 !== (k < 12)) begin
        failures++;
        $display("FAIL timing at cycle %0d: done %b %b busy %b %b", k, done256, done512, busy256, busy512);
      end
      if (k == 9) begin
        checks++;
        if (o256 !== e256) begin
          failures++;
          $display("FAIL 256: %h expected %h", o256, e256);
        end
      end
      if (k == 12) begin
        checks++;
        if (o512 !== e512) begin
          failures++;
          $display("FAIL 512: %h expected %h", o512, e512);
        end
      end
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    call(1'b0, 256'h2d25a9b0c86953a3661d1ede15dee4f959aac2e1632a43b6fac8fdbad530aa25, 512'hf01c9be084836b7c87780bdcb25ad1034dbd859abc847fd105ad108c0030390eb8b6a8a847ac97717fb782a6a49e3476fa310799348acd226a2026e40f3b41ab);
    call(1'b1, 256'hdb6a6a0c3889ed69565ce45e993edba97bff99187ea01d73fc57b915a654916e, 512'h83c7c7c1ea77fd9a2f14089768a0cc40755ddc8410e41d554140524acda685d0a0f052c3fc497714b0bddf312cbc612988b79650b4ab9651c361587a4f8b50d7);
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
