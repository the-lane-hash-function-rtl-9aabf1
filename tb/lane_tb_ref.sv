// lane_tb_ref: reference arithmetic for the Lane testbenches, written
// independently of the design: GF(2^8) multiplication by polynomial
// long-hand reduction, the S-box by exhaustive search for the inverse, and
// the round constants by running the LFSR step by step.
package lane_tb_ref;

  function automatic logic [7:0] ref_mul(logic [7:0] a, logic [7:0] b);
    logic [14:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 15'(a) << i;
    for (int i = 14; i >= 8; i--) if (p[i]) p ^= 15'h11b << (i - 8);
    return p[7:0];
  endfunction

  function automatic logic [7:0] ref_sbox(logic [7:0] a);
    logic [7:0] inv;
    logic [7:0] s;
    inv = 8'h00;
    for (int v = 1; v < 256; v++) if (ref_mul(a, 8'(v)) == 8'h01) inv = 8'(v);
    for (int i = 0; i < 8; i++)
      s[i] = inv[i] ^ inv[(i + 4) % 8] ^ inv[(i + 5) % 8] ^ inv[(i + 6) % 8] ^ inv[(i + 7) % 8];
    return s ^ 8'h63;
  endfunction

  function automatic logic [31:0] ref_k(int idx);
    logic [31:0] k;
    k = 32'h07fc703d;
    for (int i = 0; i < idx; i++) k = k[0] ? ((k >> 1) ^ 32'hd0000001) : (k >> 1);
    return k;
  endfunction

  // Test pattern: byte i of an nbytes-long string is (seed*i + 5) mod 256,
  // byte 0 in the MSBs of the returned 1024-bit value's low nbytes*8 bits.
  function automatic logic [1023:0] pattern(int nbytes, int seed);
    logic [1023:0] v;
    v = '0;
    for (int i = 0; i < nbytes; i++) v[8 * (nbytes - 1 - i) +: 8] = 8'((i * seed + 5) % 256);
    return v;
  endfunction

endpackage
