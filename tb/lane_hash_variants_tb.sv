// lane_hash_variants_tb: end-to-end test of lane_hash for the other three
// digest sizes, Lane-224 (truncated 256-bit state), Lane-384 (truncated
// 512-bit state) and Lane-512, each through lane_hash_variant_check, which
// checks digests against an independent software model and the cycle count
// of every hash.
module lane_hash_variants_tb;
  logic [2:0] fin;
  int         c [3];
  int         f [3];

  lane_hash_variant_check #(.DIGEST_BITS(224)) u_224 (.fin(fin[0]), .n_checks(c[0]), .n_failures(f[0]));
  lane_hash_variant_check #(.DIGEST_BITS(384)) u_384 (.fin(fin[1]), .n_checks(c[1]), .n_failures(f[1]));
  lane_hash_variant_check #(.DIGEST_BITS(512)) u_512 (.fin(fin[2]), .n_checks(c[2]), .n_failures(f[2]));

  int wd_fail = 0;

  initial begin
    fork
      wait (fin == 3'b111);
      begin
        #500000;
        wd_fail = 1;
        $display("FAIL watchdog expired");
      end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2] + wd_fail);
    $finish;
  end
endmodule
